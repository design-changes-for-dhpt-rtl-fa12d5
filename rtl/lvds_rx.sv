`timescale 1ps/1fs
// lvds_rx: behavioural model of the DCD data / command line receiver with
// input hysteresis (not synthesizable: the real part is an analog comparator).
//
// The receiver compares rx against rxn (for single-ended low-voltage signalling
// rxn is a fixed reference at the common-mode voltage). The output goes high
// once rx - rxn exceeds +HYST_RISE_MV and low once it falls below
// -HYST_FALL_MV, after T_PD_PS. The defaults are the revised receiver's
// typical-corner hysteresis (34.4 mV rising, 27.5 mV falling, about half the
// earlier design's 57 / 70 mV). Asymmetric hysteresis together with slow,
// asymmetric input edges is what shifts the duty cycle of the output.
module lvds_rx #(
  parameter real         HYST_RISE_MV = 34.4,
  parameter real         HYST_FALL_MV = 27.5,
  parameter int unsigned T_PD_PS      = 100
) (
  input  real  rx,      // volts
  input  real  rxn,     // volts
  output logic dout
);
  logic state;
  real  diff_mv;

  initial begin
    state = 1'b0;
    dout  = 1'b0;
  end

  always_comb diff_mv = (rx - rxn) * 1000.0;

  always @(diff_mv) begin
    if (!state && diff_mv > HYST_RISE_MV) state = 1'b1;
    else if (state && diff_mv < -HYST_FALL_MV) state = 1'b0;
  end

  always @(state) dout <= #(T_PD_PS * 1ps) state;

endmodule
