`timescale 1ps/1fs
// delay_line: behavioural model of the programmable delay line (not
// synthesizable logic: the real part is a full-custom chain of inverters).
//
// The line is a chain of 2**SEL_W - 1 identical delay elements; a multiplexer
// picks the input (tap 0) or the output of element k (tap k) according to
// sel, so the delay is T_MIN_PS + sel * T_STEP_PS. The revised line is built
// from identical inverters, so rising and falling edges are delayed alike and
// the duty cycle is kept. SKEW_PS models the older standard-cell line whose
// elements favour one edge: a rising edge is delayed SKEW_PS more per
// element than a falling one, which distorts the duty cycle in proportion to
// the programmed delay. Default SKEW_PS = 0 is the revised line.
// Delays are transport delays: every input edge appears at the output.
module delay_line #(
  parameter int unsigned SEL_W     = 2,
  parameter int unsigned T_MIN_PS  = 130,
  parameter int unsigned T_STEP_PS = 170,
  parameter int unsigned SKEW_PS   = 0
) (
  input  logic             din,
  input  logic [SEL_W-1:0] sel,
  output logic             dout
);
  int unsigned t_rise, t_fall;

  always_comb begin
    t_fall = T_MIN_PS + 32'(sel) * T_STEP_PS;
    t_rise = t_fall + 32'(sel) * SKEW_PS;
  end

  initial dout = 1'b0;

  always @(posedge din) dout <= #(t_rise * 1ps) 1'b1;
  always @(negedge din) dout <= #(t_fall * 1ps) 1'b0;

endmodule
