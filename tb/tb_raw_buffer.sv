`timescale 1ps/1fs
// tb_raw_buffer: writes two and a half frames of numbered samples (small
// geometry: 12 rows, 8 lanes) and reads every row back. Each read must return
// the newest complete copy of the row: rows already rewritten in the current
// frame come from it, the rest from the frame before (re-sorted dump order).
// A read has one cycle of latency.
module tb_raw_buffer;
  localparam int ROWS = 12, LANES = 8, CH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_bank = 0, rd_en = 0;
  logic [7:0] wr_row = 0, rd_row = 0;
  logic [1:0] wr_beat = 0, rd_beat = 0;
  logic [LANES-1:0][7:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  raw_buffer #(.ROWS(ROWS), .LANES(LANES), .CH_PER_LANE(CH)) dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] val(int frame, int r, int b, int l);
    return 8'(frame * 97 + r * 13 + b * 5 + l * 3 + 1);
  endfunction

  task automatic write_row(int frame, int r);
    for (int b = 0; b < CH; b++) begin
      logic [LANES-1:0][7:0] d;
      for (int l = 0; l < LANES; l++) d[l] = val(frame, r, b, l);
      wr_en <= 1; wr_row <= 8'(r); wr_beat <= 2'(b); wr_bank <= frame[0];
      wr_data <= d;
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < ROWS; r++) write_row(f, r);
    // frame 2 up to row 4
    for (int r = 0; r < 5; r++) write_row(2, r);
    wr_en <= 0;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int b = 0; b < CH; b++) begin
        int fexp;
        rd_en <= 1; rd_row <= 8'(r); rd_beat <= 2'(b);
        @(posedge clk); rd_en <= 0; #1;
        fexp = (r < 5) ? 2 : 1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (rd_data[l] !== val(fexp, r, b, l)) begin
            failures++;
            if (l == 0) $display("FAIL r%0d b%0d l%0d got %0d want %0d", r, b, l, rd_data[l], val(fexp, r, b, l));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
