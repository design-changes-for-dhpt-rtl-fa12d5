`timescale 1ps/1fs
// tb_lfsr8: the pattern must repeat every 255 bits and not earlier, hold 128
// ones per period (maximal-length sequence), and start again after reset.
module tb_lfsr8;
  logic clk = 0, rb = 0, out;
  int checks = 0, failures = 0;
  logic seq [600];

  lfsr8 dut (.clk, .rb, .out);
  always #312.5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_period(input int p);
    for (int i = 0; i + p < 600; i++) if (seq[i] != seq[i + p]) return 0;
    return 1;
  endfunction

  initial begin
    int ones;
    repeat (2) @(posedge clk);
    #1 rb = 1;
    for (int i = 0; i < 600; i++) begin
      seq[i] = out;
      @(posedge clk); #1;
    end
    checks++; if (!is_period(255)) begin failures++; $display("FAIL no period 255"); end
    for (int p = 1; p < 255; p++) if (255 % p == 0) begin
      checks++; if (is_period(p)) begin failures++; $display("FAIL period %0d", p); end
    end
    // reference: Fibonacci form of x^8 + x^6 + x^5 + x^4 + 1, seed 0x01
    begin
      logic [7:0] m = 8'h01;
      int bad = 0;
      for (int i = 0; i < 600; i++) begin
        if (seq[i] != m[7]) bad++;
        m = {m[6:0], m[7] ^ m[5] ^ m[4] ^ m[3]};
      end
      checks++; if (bad != 0) begin failures++; $display("FAIL %0d bits differ from the reference", bad); end
    end
    ones = 0;
    for (int i = 0; i < 255; i++) ones += seq[i];
    checks++; if (ones != 128) begin failures++; $display("FAIL ones %0d", ones); end
    // reset restarts the sequence
    rb = 0; #10 rb = 1; #1;
    for (int i = 0; i < 20; i++) begin
      checks++; if (out != seq[i]) failures++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
