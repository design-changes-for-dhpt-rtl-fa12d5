`timescale 1ps/1fs
// tb_hit_finder: random corrected beats with and without the trigger window.
// Checks that exactly the samples above the threshold inside the window are
// pushed, one cycle later, with the right row, column (lane*4 + beat) and
// value.
module tb_hit_finder;
  import dhp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] hit_thr = 8'd100;
  logic window = 0, in_valid = 0;
  logic [7:0] in_row = 0;
  logic [1:0] in_beat = 0;
  logic [LANES-1:0][7:0] in_data;
  logic [LANES-1:0] push;
  hit_t [LANES-1:0] hit;
  int checks = 0, failures = 0, n_hits = 0;

  hit_finder dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LANES-1:0][7:0] d;
    logic v, w;
    logic [7:0] r;
    logic [1:0] b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      for (int l = 0; l < LANES; l++) d[l] = 8'($urandom_range(0, 130));
      v = ($urandom_range(0, 3) != 0);
      w = (n % 50) < 30;
      r = 8'($urandom_range(0, ROWS - 1));
      b = 2'($urandom_range(0, 3));
      in_valid <= v; window <= w; in_row <= r; in_beat <= b; in_data <= d;
      @(posedge clk); #1;
      for (int l = 0; l < LANES; l++) begin
        logic exp_push;
        exp_push = v && w && (d[l] > hit_thr);
        checks++;
        if (push[l] !== exp_push) begin failures++; $display("FAIL push lane %0d", l); end
        if (exp_push) begin
          n_hits++;
          checks++;
          if (hit[l].row != r || hit[l].col != 8'(l * CH_PER_LANE + b) || hit[l].adc != d[l]) begin
            failures++; $display("FAIL hit lane %0d", l);
          end
        end
      end
    end
    checks++; if (n_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
