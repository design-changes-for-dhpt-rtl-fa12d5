`timescale 1ps/1fs
// tb_lvds_rx: ramps a single-ended input around a 1.2 V reference and records
// where the output switches. It must switch high 34.4 mV above and low
// 27.5 mV below the reference (hysteresis of the revised receiver), not at
// the crossing, and the output must follow after the propagation delay.
module tb_lvds_rx;
  real rx = 1.1, rxn = 1.2;
  logic dout;
  int checks = 0, failures = 0;
  real v_rise = 0.0, v_fall = 0.0;

  lvds_rx dut (.rx, .rxn, .dout);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    checks++; if (dout !== 1'b0) failures++;
    // rising ramp in 0.1 mV steps every 10 ps
    for (int i = 0; i < 2000; i++) begin
      rx = 1.1 + i * 0.0001;
      #10;
      if (dut.state && v_rise == 0.0) v_rise = rx;
    end
    #200;
    checks++; if (dout !== 1'b1) failures++;
    for (int i = 0; i < 2000; i++) begin
      rx = 1.3 - i * 0.0001;
      #10;
      if (!dut.state && v_fall == 0.0) v_fall = rx;
    end
    #200;
    checks++; if (dout !== 1'b0) failures++;
    checks++;
    if ((v_rise - 1.2) * 1000.0 < 34.3 || (v_rise - 1.2) * 1000.0 > 34.6) begin
      failures++; $display("FAIL rise threshold %f", v_rise);
    end
    checks++;
    if ((1.2 - v_fall) * 1000.0 < 27.4 || (1.2 - v_fall) * 1000.0 > 27.7) begin
      failures++; $display("FAIL fall threshold %f", v_fall);
    end
    // propagation delay
    rx = 1.3; #1;
    checks++; if (dout !== 1'b0) failures++;
    #100;
    checks++; if (dout !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
