`timescale 1ps/1fs
// raw_buffer: two-frame raw data memory.
//
// Holds the raw DCD samples of two frames (2 x ROWS rows, each row CH_PER_LANE
// beats of LANES 8-bit samples). A row is written beat by beat into the bank
// given by the frame parity. A per-row register remembers which bank holds the
// most recent complete copy of that row, so a read of row r always returns
// the newest data: reading rows 0..row_max after a freeze gives the
// re-sorted calibration frame, which starts with row 0 of the newest frame and
// ends with row_max of the frame before, wherever the freeze fell.
// A row whose writing started is finished even if wr_en is held off
// mid-row by the caller (the caller gates on beat 0).
//
// Write: one beat per cycle (wr_en, wr_row, wr_beat, wr_bank, wr_data); the
// row's bank entry is updated with its last beat. Read: rd_row/rd_beat in,
// rd_data one cycle later (synchronous read).
module raw_buffer #(
  parameter int unsigned ROWS        = dhp_pkg::ROWS,
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [7:0]                wr_row,
  input  logic [1:0]                wr_beat,
  input  logic                      wr_bank,
  input  logic [LANES-1:0][7:0]     wr_data,
  input  logic                      rd_en,
  input  logic [7:0]                rd_row,
  input  logic [1:0]                rd_beat,
  output logic [LANES-1:0][7:0]     rd_data
);
  localparam int unsigned DEPTH = 2 * ROWS * CH_PER_LANE;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [LANES*8-1:0] mem [DEPTH];
  logic [ROWS-1:0]    newest_bank;

  function automatic logic [AW-1:0] addr(input logic bank, input logic [7:0] r,
                                         input logic [1:0] b);
    return AW'((32'(bank) * ROWS + 32'(r)) * CH_PER_LANE + 32'(b));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr(wr_bank, wr_row, wr_beat)] <= wr_data;
    if (rd_en) rd_data <= mem[addr(newest_bank[rd_row], rd_row, rd_beat)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) newest_bank <= '0;
    else if (wr_en && wr_beat == 2'(CH_PER_LANE - 1)) newest_bank[wr_row] <= wr_bank;
  end

endmodule
