`timescale 1ps/1fs
// lfsr8: 8-bit pseudo-random bit pattern source for link tests.
//
// A Fibonacci LFSR with the maximal-length polynomial x^8+x^6+x^5+x^4+1
// (period 255) clocked by the bit clock. The test pattern is called "LFSR-8"
// only; the polynomial and seed are this design's choice. rb is the
// active-low reset, which loads the seed 8'h01. out is the register's MSB.
module lfsr8 (
  input  logic clk,
  input  logic rb,
  output logic out
);
  logic [7:0] r;

  always_ff @(posedge clk or negedge rb) begin
    if (!rb) r <= 8'h01;
    else     r <= {r[6:0], r[7] ^ r[5] ^ r[4] ^ r[3]};
  end

  assign out = r[7];

endmodule
