`timescale 1ps/1fs
// tb_delay_line: measures the delay of rising and falling edges for every
// setting of a 2-bit line (130 ps + 170 ps per element) and checks that the
// revised line (no skew) keeps a 50 % duty cycle. A second instance with
// 20 ps edge skew per element models the older line: its high pulse must
// shrink by 20 ps per selected element (duty cycle distortion growing with
// the programmed delay).
module tb_delay_line;
  logic din = 0;
  logic [1:0] sel = 0;
  logic dout, dout_s;
  int checks = 0, failures = 0;

  delay_line #(.SEL_W(2), .T_MIN_PS(130), .T_STEP_PS(170), .SKEW_PS(0))  dut  (.din, .sel, .dout);
  delay_line #(.SEL_W(2), .T_MIN_PS(130), .T_STEP_PS(170), .SKEW_PS(20)) dut_s (.din, .sel, .dout(dout_s));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_in_r, t_in_f, t_out_r, t_out_f, ts_r, ts_f;
  always @(posedge dout)   t_out_r = $realtime;
  always @(negedge dout)   t_out_f = $realtime;
  always @(posedge dout_s) ts_r = $realtime;
  always @(negedge dout_s) ts_f = $realtime;

  initial begin
    for (int s = 0; s < 4; s++) begin
      real want;
      sel = 2'(s);
      #2000;
      din = 1; t_in_r = $realtime;
      #1250;
      din = 0; t_in_f = $realtime;
      #2000;
      want = 130.0 + 170.0 * s;
      checks++;
      if ((t_out_r - t_in_r) != want * 1ps) begin failures++; $display("FAIL rise sel %0d: %0t", s, t_out_r - t_in_r); end
      checks++;
      if ((t_out_f - t_in_f) != want * 1ps) begin failures++; $display("FAIL fall sel %0d", s); end
      checks++;
      if ((t_out_f - t_out_r) != 1250.0 * 1ps) begin failures++; $display("FAIL pulse width sel %0d", s); end
      checks++;
      if ((ts_f - ts_r) != (1250.0 - 20.0 * s) * 1ps) begin failures++; $display("FAIL skewed width sel %0d: %0t", s, ts_f - ts_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
