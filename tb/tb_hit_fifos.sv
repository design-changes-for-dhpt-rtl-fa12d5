`timescale 1ps/1fs
// tb_hit_fifos: bursts of hits on random lanes (default 64 lanes, 256-word
// FIFO1s, 4096-word FIFO2), read out with random stalls. Every hit must come
// out exactly once and, per lane, in order; all_empty must be high at the
// end. A second phase overfills one lane's FIFO1 without reading, so FIFO1
// and FIFO2 fill up and the lost-hit counter must count the overflow.
module tb_hit_fifos;
  import dhp_pkg::*;
  logic clk = 0, rst_n = 0, pop = 0;
  logic [LANES-1:0] push = '0;
  hit_t [LANES-1:0] hit;
  hit_t dout;
  logic empty, all_empty;
  logic [15:0] lost1;
  logic [12:0] fifo2_count;
  logic [8:0] fifo1_max;
  int checks = 0, failures = 0;

  hit_fifos dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hit_t exp_q [LANES][$];
  int n_in = 0, n_out = 0;

  // reader
  always @(posedge clk) begin
    #1;
    if (pop && !empty) begin
      int l;
      l = int'(dout.col) / CH_PER_LANE;
      checks++;
      if (exp_q[l].size() == 0 || dout !== exp_q[l][0]) begin
        failures++;
        if (failures < 5) $display("FAIL lane %0d order", l);
      end else void'(exp_q[l].pop_front());
      n_out++;
    end
  end

  initial begin
    logic [LANES-1:0] p;
    hit_t [LANES-1:0] h;
    logic rd;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #2;
    for (int n = 0; n < 2000; n++) begin
      for (int l = 0; l < LANES; l++) begin
        p[l] = ($urandom_range(0, 99) < 2);
        h[l].row = 8'(n);
        h[l].col = 8'(l * CH_PER_LANE + (n % 4));
        h[l].adc = 8'($urandom());
        if (p[l]) begin exp_q[l].push_back(h[l]); n_in++; end
      end
      rd = ($urandom_range(0, 3) != 0);
      push <= p; hit <= h; pop <= rd;
      @(posedge clk); #2;
    end
    push <= '0; pop <= 1;
    repeat (3000) @(posedge clk);
    #2;
    checks++; if (n_out != n_in || !all_empty) begin failures++; $display("FAIL in %0d out %0d", n_in, n_out); end
    checks++; if (lost1 != 0) failures++;
    // overflow: lane 3 pushes every cycle, nothing is read
    pop <= 0;
    for (int n = 0; n < 4096 + 256 + 100; n++) begin
      p = '0; p[3] = 1;
      push <= p;
      @(posedge clk);
    end
    push <= '0;
    @(posedge clk); #2;
    checks++; if (fifo2_count != 13'(4096)) begin failures++; $display("FAIL fifo2 %0d", fifo2_count); end
    checks++; if (fifo1_max != 9'(256)) begin failures++; $display("FAIL fifo1 %0d", fifo1_max); end
    checks++; if (lost1 != 16'(100)) begin failures++; $display("FAIL lost %0d", lost1); end
    // two lanes overflowing in the same cycles: each lost hit counts
    for (int n = 0; n < 256 + 44; n++) begin
      p = '0; p[5] = 1; p[6] = 1;
      push <= p;
      @(posedge clk);
    end
    push <= '0;
    @(posedge clk); #2;
    checks++; if (lost1 != 16'(188)) begin failures++; $display("FAIL lost %0d", lost1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
