`timescale 1ps/1fs
// tb_serializer20: sends random 20-bit words through the serializer and
// rebuilds them from the serial output, LSB first, 20 bit clocks per word.
// The word clock and the two-cycle load pulse are made by the testbench.
module tb_serializer20;
  logic clk_bit = 0, rst_n = 0;
  logic clk_word = 0, load = 0;
  logic [19:0] data;
  logic out;
  int checks = 0, failures = 0;

  serializer20 dut (.clk_bit, .clk_word, .rst_n, .load, .data, .out);

  always #312.5 clk_bit = ~clk_bit;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word clock and load made from a bit-clock counter
  int bc = 0;
  always @(posedge clk_bit) begin
    if (rst_n) begin
      bc <= (bc == 19) ? 0 : bc + 1;
      clk_word <= (bc >= 9 && bc < 19);
      load <= (bc == 9 || bc == 10);
    end
  end

  logic [19:0] sent [$];
  logic [19:0] want, got;
  always @(posedge clk_word) if (rst_n) begin
    data <= $urandom();
  end
  always @(posedge clk_word) if (rst_n) sent.push_back(data);

  initial begin
    data = '0;
    repeat (4) @(posedge clk_bit);
    rst_n = 1;
    // wait for the first load taken by the serializer
    @(posedge load); @(posedge clk_bit); #1;
    // skip the word captured before data was random
    repeat (40) begin
      for (int i = 0; i < 20; i++) begin
        got[i] = out;
        @(posedge clk_bit); #1;
      end
      checks++;
      if (sent.size() == 0) begin
        failures++;
      end else begin
        want = sent.pop_front();
        if (got !== want) begin
          failures++;
          $display("FAIL word got %h want %h", got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
