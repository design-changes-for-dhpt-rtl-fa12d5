`timescale 1ps/1fs
// tb_cml_driver: drives a transition and measures the differential output.
// With 1 mA main and 1 mA boost bias (20 mA and 2 mA in the stages, 50 ohm
// loads) the swing must be R*(I0+I1) = 1.1 V right after the edge and
// R*(I0-I1) = 0.9 V after the boost delay, and the high-swing part must last
// the boost delay of the setting: 130, 300, 470, 640 ps for SW = 11, 01, 10, 00.
module tb_cml_driver;
  logic d = 0;
  logic [1:0] sw = 2'b11;
  real ibias_ma = 1.0, ibiasd_ma = 1.0;
  real tx_p, tx_n;
  int checks = 0, failures = 0;

  cml_driver dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  initial begin
    logic [1:0] sws [4] = '{2'b11, 2'b01, 2'b10, 2'b00};
    int dly [4] = '{130, 300, 470, 640};
    for (int k = 0; k < 4; k++) begin
      sw = sws[k];
      d = 0; #3000;
      checks++; if (!near(tx_p - tx_n, -0.9)) begin failures++; $display("FAIL low steady %f", tx_p - tx_n); end
      d = 1;
      #(dly[k] - 20);
      checks++; if (!near(tx_p - tx_n, 1.1)) begin failures++; $display("FAIL boosted %f sw %b", tx_p - tx_n, sw); end
      #40;
      checks++; if (!near(tx_p - tx_n, 0.9)) begin failures++; $display("FAIL settled %f sw %b", tx_p - tx_n, sw); end
      #3000;
    end
    // boost off: plain swing
    ibiasd_ma = 0.0; d = 0; #3000;
    checks++; if (!near(tx_p - tx_n, -1.0)) begin failures++; $display("FAIL no boost %f", tx_p - tx_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
