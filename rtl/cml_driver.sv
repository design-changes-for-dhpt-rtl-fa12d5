`timescale 1ps/1fs
// cml_driver: behavioural model of the current-mode-logic link driver with
// pre-emphasis (not synthesizable: the real part is an analog output stage).
//
// Two differential pairs share 50 ohm loads to VDD (1.2 V). The main pair
// steers I0 = MAIN_RATIO * ibias_ma (bias mirror 1:20) by the data bit; the
// pre-emphasis pair steers I1 = BOOST_RATIO * ibiasd_ma (mirror 1:2) by the
// inverted, delayed data. Right after a transition both currents add
// (swing MAIN+BOOST); once the delayed copy has caught up they oppose
// (MAIN-BOOST). The boost delay is set by sw[1:0]: 11 -> 130 ps, 01 -> 300 ps,
// 10 -> 470 ps, 00 -> 615 ps measured, modelled as 130 ps plus 170 ps per
// delay element (so 640 ps at 00). Outputs are the two single-ended pad
// voltages in volts, clamped at 0 V.
// From the document: the 1:20 and 1:2 mirrors, the bias ranges and the
// four measured delays. Version 1.1 changes this driver only by reducing
// parasitic resistance in wiring and vias; the model has no parasitics, so it
// describes the 1.0 and 1.1 drivers alike. Own choices: ideal current steering,
// the 170 ps per element fit, and the sw-to-tap mapping order.
module cml_driver #(
  parameter real R_LOAD      = 50.0,
  parameter real VDD         = 1.2,
  parameter real MAIN_RATIO  = 20.0,
  parameter real BOOST_RATIO = 2.0
) (
  input  logic       d,
  input  logic [1:0] sw,
  input  real        ibias_ma,    // IBIAS_DRIVER, mA (1 typ., 5 max.)
  input  real        ibiasd_ma,   // IBIASD_DRIVER, mA (1 typ., 5 max.)
  output real        tx_p,
  output real        tx_n
);
  logic       d_del;
  logic [1:0] tap;
  real        i0, i1, ip, in_;

  // measured order 11, 01, 10, 00 = shortest to longest delay
  assign tap = {~sw[0], ~sw[1]};

  delay_line #(.SEL_W(2), .T_MIN_PS(130), .T_STEP_PS(170), .SKEW_PS(0)) u_del (
    .din(d), .sel(tap), .dout(d_del)
  );

  always_comb begin
    i0  = MAIN_RATIO * ibias_ma * 1.0e-3;
    i1  = BOOST_RATIO * ibiasd_ma * 1.0e-3;
    ip  = (d ? 0.0 : i0) + (d_del ? i1 : 0.0);
    in_ = (d ? i0 : 0.0) + (d_del ? 0.0 : i1);
    tx_p = (VDD - R_LOAD * ip > 0.0) ? VDD - R_LOAD * ip : 0.0;
    tx_n = (VDD - R_LOAD * in_ > 0.0) ? VDD - R_LOAD * in_ : 0.0;
  end

endmodule
