`timescale 1ps/1fs
// tb_cnt20_load: checks the word clock divider and the load pulse.
// The word clock must have a period of 20 bit clocks with 10 high, and the
// load pulse must be exactly two bit clocks wide, rising with the word clock,
// once per word period.
module tb_cnt20_load;
  logic clk_bit = 0, rst_n = 0;
  logic f80m, load;
  int checks = 0, failures = 0;

  cnt20_load dut (.clk_bit, .rst_n, .f80m, .load);

  always #312.5 clk_bit = ~clk_bit;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_rise = -1, high_cnt = 0, load_cnt = 0, load_start = -1;
  logic f_d = 0, l_d = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk_bit);
    rst_n = 1;
    repeat (400) begin
      @(posedge clk_bit); #1;
      cyc++;
      if (f80m && !f_d) begin
        if (last_rise >= 0) check(cyc - last_rise == 20, "word clock period");
        if (last_rise >= 0) check(high_cnt == 10, "word clock high time");
        last_rise = cyc;
        high_cnt = 0;
      end
      if (f80m) high_cnt++;
      if (load && !l_d) begin
        load_start = cyc;
        check(f80m && !f_d, "load rises with word clock");
      end
      if (!load && l_d && load_start >= 0) check(cyc - load_start == 2, "load width 2");
      if (load) load_cnt++;
      f_d = f80m;
      l_d = load;
    end
    check(load_cnt >= 2 * 19 && load_cnt <= 2 * 20, "load count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
