`timescale 1ps/1fs
// tb_trigger_ctrl: row/frame counting, event window, calibration hold.
// Uses the default geometry (192 rows of 8 cycles). Checks: rows advance
// every 8 cycles and wrap after 192; FSYNC restarts at row 0 and flips the
// frame parity; a trigger opens the window with the current row and closes
// it on release; a trigger while the framer is busy is ignored; a
// calibration trigger sets the write inhibit at once, is held while the
// framer is busy (case B) and starts the dump once it is idle; dump_done
// releases the inhibit.
module tb_trigger_ctrl;
  logic clk = 0, rst_n = 0;
  logic trg_lvl = 0, fsync = 0, caltrg = 0, framer_busy = 0, dump_done = 0;
  logic [7:0] row, ev_row;
  logic row_start, frame_par, window, ev_start, ev_stop, dump_start, wr_inhibit, cal_hold;
  logic [15:0] trg_ignored;
  int checks = 0, failures = 0;

  trigger_ctrl dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (row %0d)", msg, row); end
  endtask

  int n_ev_start = 0, n_dump = 0;
  always @(posedge clk) begin
    #2;
    if (ev_start) n_ev_start++;
    if (dump_start) n_dump++;
  end

  initial begin
    logic p0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // FSYNC: row 0
    fsync <= 1; @(posedge clk); fsync <= 0; #1;
    check(row == 0, "row 0 after FSYNC");
    p0 = frame_par;
    repeat (8 * 10) @(posedge clk); #1;
    check(row == 10, "10 rows in 80 cycles");
    repeat (8 * 182) @(posedge clk); #1;
    check(row == 0 && frame_par != p0, "wrap after 192 rows");
    // trigger at row 5
    repeat (8 * 5) @(posedge clk);
    trg_lvl <= 1; @(posedge clk); @(posedge clk); #3;
    check(window && ev_row == 5 && n_ev_start == 1, "window opens at row 5");
    framer_busy <= 1;
    repeat (1536) @(posedge clk);
    trg_lvl <= 0; @(posedge clk); @(posedge clk); #3;
    check(!window, "window closed");
    // calibration while framer still busy: held (case B)
    caltrg <= 1; @(posedge clk); caltrg <= 0; @(posedge clk); #3;
    check(wr_inhibit && cal_hold && n_dump == 0, "calibration held, buffer frozen");
    // a physics trigger now is ignored
    trg_lvl <= 1; @(posedge clk); @(posedge clk); #3;
    check(!window && trg_ignored == 1, "trigger ignored during calibration");
    trg_lvl <= 0;
    repeat (20) @(posedge clk);
    framer_busy <= 0; @(posedge clk); @(posedge clk); #3;
    check(n_dump == 1 && !cal_hold && wr_inhibit, "dump starts when framer idle");
    framer_busy <= 1;
    repeat (50) @(posedge clk);
    dump_done <= 1; framer_busy <= 0; @(posedge clk); dump_done <= 0; @(posedge clk); #3;
    check(!wr_inhibit, "inhibit released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
