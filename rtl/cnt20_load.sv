`timescale 1ps/1fs
// cnt20_load: word clock and serializer load pulse generator.
//
// The 1.6 GHz bit clock is divided by DIV_HALF (10) in a modulo counter whose
// terminal count toggles a flip-flop; that flip-flop is the 80 MHz word clock
// (f80m, period 2*DIV_HALF bit clocks, 50 % duty). The load pulse marks the
// rising edge of the word clock in the bit clock domain: the word clock passes
// through two bit-clock flip-flops in series and load = f80m AND NOT(second
// flop). This two-flop chain is the corrected counter cell; the earlier cell
// fed the second flop directly from the word clock, which left the load timing
// to a race against the divided clock. Here every flop is clocked by clk_bit
// (the divider flop has an enable instead of being clocked by the terminal
// count), which is this design's synchronous rendering of the cell.
//
// Timing: f80m rises on the bit clock edge after the counter reaches
// DIV_HALF-1 with f80m low; load is high for exactly two bit clock cycles
// starting in that same cycle, once every 2*DIV_HALF cycles.
module cnt20_load #(
  parameter int unsigned DIV_HALF = 10
) (
  input  logic clk_bit,
  input  logic rst_n,
  output logic f80m,
  output logic load
);
  localparam int unsigned CW = $clog2(DIV_HALF);

  logic [CW-1:0] cnt;     // modulo-DIV_HALF counter (cnt10_mod)
  logic          tc;      // terminal count (cnt10)
  logic          q1, q2;  // delay chain sampling the word clock

  assign tc = (cnt == CW'(DIV_HALF - 1));

  always_ff @(posedge clk_bit or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      f80m <= 1'b0;
      q1   <= 1'b0;
      q2   <= 1'b0;
    end else begin
      cnt  <= tc ? '0 : cnt + 1'b1;
      if (tc) f80m <= ~f80m;
      q1   <= f80m;
      q2   <= q1;
    end
  end

  assign load = f80m & ~q2;

endmodule
