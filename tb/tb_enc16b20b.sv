`timescale 1ps/1fs
// tb_enc16b20b: checks the registered pair of 8b/10b encoders that makes the
// 20-bit link word. Known words: after reset (negative disparity) an idle
// word K28.5 K28.5 must give K28.5- in code[9:0] (sent first) and K28.5+ in
// code[19:10]; the next idle starts negative again; D0.0 D0.0 gives
// 100111 0100 twice (balanced). Then a random stream of data and K28.5 words:
// read in sending order (code[0] first) it may never run more than five equal
// bits, and its running digital sum must stay within +-3 and be +-1 at every
// character boundary - which fails if the disparity is not carried from the
// first byte to the second and from word to word. Output latency: one clock.
module tb_enc16b20b;
  logic clk = 0, rst_n = 0;
  logic [15:0] word = '0;
  logic [1:0] kflag = '0;
  logic [19:0] code;
  int checks = 0, failures = 0;

  enc16b20b dut (.*);

  always #6250 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // table notation abcdei fghj (a first) to code bit order (a = bit 0)
  function automatic logic [9:0] line(input logic [9:0] tbl);
    logic [9:0] c;
    for (int i = 0; i < 10; i++) c[i] = tbl[9 - i];
    return c;
  endfunction

  task automatic send(input logic [15:0] w, input logic [1:0] kf);
    word <= w; kflag <= kf;
    @(posedge clk); #1;
  endtask

  task automatic expect_code(input logic [9:0] first, input logic [9:0] second, input string what);
    checks++;
    if (code !== {line(second), line(first)}) begin
      failures++;
      $display("FAIL %s got %b", what, code);
    end
  endtask

  initial begin
    int run, last, sum;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    send(16'hBCBC, 2'b11);
    expect_code(10'b0011111010, 10'b1100000101, "idle after reset");
    send(16'hBCBC, 2'b11);
    expect_code(10'b0011111010, 10'b1100000101, "second idle");
    send(16'h0000, 2'b00);
    expect_code(10'b1001110100, 10'b1001110100, "D0.0 D0.0");
    send(16'hBCBC, 2'b11);
    expect_code(10'b0011111010, 10'b1100000101, "idle after balanced pair");
    // random stream, checked in sending order
    run = 0; last = -1; sum = -1;
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] w;
      logic [1:0] kf;
      w = 16'($urandom()); kf = 2'b00;
      if ($urandom_range(0, 7) == 0) begin w[15:8] = 8'hBC; kf[1] = 1; end
      if ($urandom_range(0, 7) == 0) begin w[7:0]  = 8'hBC; kf[0] = 1; end
      send(w, kf);
      for (int i = 0; i < 20; i++) begin
        if (code[i] == last) run++; else run = 1;
        last = code[i];
        sum += code[i] ? 1 : -1;
        checks++;
        if (run > 5 || sum > 3 || sum < -3) begin failures++; if (failures < 5) $display("FAIL stream run %0d sum %0d", run, sum); end
        if (i == 9 || i == 19) begin
          checks++;
          if (sum != 1 && sum != -1) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
