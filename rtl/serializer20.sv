`timescale 1ps/1fs
// serializer20: W-bit (20) parallel to serial converter for the Gbit link.
//
// The parallel word is captured on the rising edge of the word clock
// (clk_word, 80 MHz) into an input register. In the bit clock domain
// (clk_bit, 1.6 GHz) the shift register takes that register's content in the
// first cycle of each load pulse and shifts right otherwise, so bit 0 of the
// word leaves first. The load pulse comes from cnt20_load and is two bit
// clocks wide; acting only on its first cycle keeps exactly W bits per word.
// The serializer's insides are not given beyond its ports (clk, in<0:19>,
// load, out) and the 20 bit / 80 MHz input register; the shift direction and
// the LSB-first order are this design's choice.
//
// Timing: out carries bit k of a word during the (k+1)-th bit clock cycle
// after the first load edge; one word every W bit clocks.
module serializer20 #(
  parameter int unsigned W = 20
) (
  input  logic         clk_bit,
  input  logic         clk_word,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] data,
  output logic         out
);
  logic [W-1:0] word_q;   // input register on the word clock
  logic [W-1:0] sr;       // shift register on the bit clock
  logic         load_d;

  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) word_q <= '0;
    else        word_q <= data;
  end

  always_ff @(posedge clk_bit or negedge rst_n) begin
    if (!rst_n) begin
      sr     <= '0;
      load_d <= 1'b0;
    end else begin
      load_d <= load;
      if (load && !load_d) sr <= word_q;
      else                 sr <= {1'b0, sr[W-1:1]};
    end
  end

  assign out = sr[0];

endmodule
