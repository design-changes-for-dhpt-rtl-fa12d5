`timescale 1ps/1fs
// hit_finder: zero suppression of the corrected pixel stream.
//
// Every corrected sample above hit_thr becomes a hit record (row, column,
// value); all others are dropped. Hits are only produced while the event
// window of the physics trigger is open (triggered readout). The column of
// lane l, beat b is l*CH_PER_LANE + b (the lane carries CH_PER_LANE adjacent
// pixels) - a numbering this design chooses. One hit record per lane and cycle
// is pushed into that lane's FIFO1.
//
// Latency: one cycle (registered outputs).
module hit_finder #(
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [7:0]             hit_thr,
  input  logic                   window,
  input  logic                   in_valid,
  input  logic [7:0]             in_row,
  input  logic [1:0]             in_beat,
  input  logic [LANES-1:0][7:0]  in_data,
  output logic [LANES-1:0]       push,
  output dhp_pkg::hit_t [LANES-1:0] hit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) push <= '0;
    else
      for (int l = 0; l < LANES; l++)
        push[l] <= in_valid && window && (in_data[l] > hit_thr);
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      hit[l].row <= in_row;
      hit[l].col <= 8'(l * CH_PER_LANE + 32'(in_beat));
      hit[l].adc <= in_data[l];
    end
  end

endmodule
