`timescale 1ps/1fs
// pedestal_sub: static pedestal (fixed pattern noise) correction.
//
// Every pixel has its own 8-bit pedestal in a memory of ROWS x CH_PER_LANE
// words of LANES samples (one word per beat of a row). The pedestal is
// subtracted from each incoming sample; results below zero are clamped to 0.
// The pedestal memory is loaded through ped_we/ped_addr/ped_wdata (in the chip
// this is a configuration path; here a plain write port). The arithmetic
// (unsigned, clamped) is this design's choice.
//
// Pipeline: two cycles from in_valid to out_valid (registered memory read,
// then registered subtraction); row and beat tags travel with the data.
module pedestal_sub #(
  parameter int unsigned ROWS        = dhp_pkg::ROWS,
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ped_we,
  input  logic [9:0]            ped_addr,   // row*CH_PER_LANE + beat
  input  logic [LANES-1:0][7:0] ped_wdata,
  input  logic                  in_valid,
  input  logic [7:0]            in_row,
  input  logic [1:0]            in_beat,
  input  logic [LANES-1:0][7:0] in_data,
  output logic                  out_valid,
  output logic [7:0]            out_row,
  output logic [1:0]            out_beat,
  output logic [LANES-1:0][7:0] out_data
);
  localparam int unsigned DEPTH = ROWS * CH_PER_LANE;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [LANES*8-1:0]    mem [DEPTH];
  logic [LANES-1:0][7:0] ped_q, d1;
  logic                  v1;
  logic [7:0]            row1;
  logic [1:0]            beat1;

  always_ff @(posedge clk) begin
    if (ped_we) mem[AW'(ped_addr)] <= ped_wdata;
    ped_q <= mem[AW'(32'(in_row) * CH_PER_LANE + 32'(in_beat))];
    d1    <= in_data;
    row1  <= in_row;
    beat1 <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    out_row  <= row1;
    out_beat <= beat1;
    for (int l = 0; l < LANES; l++)
      out_data[l] <= (d1[l] > ped_q[l]) ? d1[l] - ped_q[l] : 8'd0;
  end

endmodule
