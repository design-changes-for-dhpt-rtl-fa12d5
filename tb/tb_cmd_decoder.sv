`timescale 1ps/1fs
// tb_cmd_decoder: sends command words bit-serially and checks the decoded
// levels and pulses. Starts at a random bit offset, locks on IDLE, then
// checks RST/TRG/VTO levels, FSYNC and CALTRG edges (a held CALTRG gives one
// pulse, CALTRG with FSYNC), the RST width report, and that an invalid word
// raises an error and drops the lock. Outputs must follow within 2 cycles of
// the word's last bit.
module tb_cmd_decoder;
  import dhp_pkg::*;
  logic clk = 0, rst_n = 0, cmd_in = 0;
  logic locked, rst_lvl, trg_lvl, vto_lvl, fsync, caltrg, cmd_err, rst_done;
  logic [7:0] rst_words;
  int checks = 0, failures = 0;
  int n_fsync = 0, n_cal = 0, n_err = 0;

  cmd_decoder dut (.*);
  always #6250 clk = ~clk;

  always @(posedge clk) begin
    #2;
    if (fsync) n_fsync++;
    if (caltrg) n_cal++;
    if (cmd_err) n_err++;
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] w);
    for (int i = 7; i >= 0; i--) begin
      cmd_in <= w[i];
      @(posedge clk);
    end
  endtask

  function automatic logic [7:0] man(input bit r, input bit t, input bit v, input bit f);
    return {r ? MAN_ON : MAN_OFF, t ? MAN_ON : MAN_OFF, v ? MAN_ON : MAN_OFF, f ? MAN_ON : MAN_OFF};
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic settle();
    // outputs are registered on the edge that samples the last bit
    #3;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random offset of 3 bits before the IDLE stream
    cmd_in <= 1; @(posedge clk); cmd_in <= 0; @(posedge clk); cmd_in <= 1; @(posedge clk);
    send(CMD_IDLE); send(CMD_IDLE);
    #1 check(locked, "locked after IDLE");
    // trigger on
    send(man(0, 1, 0, 0)); settle();
    check(trg_lvl && !rst_lvl && !vto_lvl, "TRG on");
    // keep, add veto and fsync
    send(man(0, 1, 1, 1));
    send(man(0, 1, 1, 1)); settle();
    check(trg_lvl && vto_lvl, "TRG+VTO");
    check(n_fsync == 1, "one FSYNC pulse for held FSYNC");
    // IDLE keeps levels
    send(CMD_IDLE); settle();
    check(trg_lvl && vto_lvl, "IDLE keeps levels");
    send(man(0, 0, 0, 0)); settle();
    check(!trg_lvl && !vto_lvl, "all off");
    // calibration trigger held for two words: one pulse; FSYNC with it
    send({CMD_CALTRG_PFX, MAN_OFF});
    send({CMD_CALTRG_PFX, MAN_ON}); settle();
    check(n_cal == 1, "one CALTRG pulse");
    check(n_fsync == 2, "FSYNC carried in CALTRG word");
    send(man(0, 0, 0, 0));
    send({CMD_CALTRG_PFX, MAN_OFF}); settle();
    check(n_cal == 2, "second CALTRG after a gap");
    // reset for three words
    send(man(1, 0, 0, 0)); send(man(1, 0, 0, 0)); send(man(1, 0, 0, 0)); settle();
    check(rst_lvl, "RST on");
    send(man(0, 0, 0, 0)); settle();
    check(rst_done && rst_words == 3, "RST width 3 words");
    check(!rst_lvl, "RST off");
    // invalid word: 11 11 11 11
    send(8'hFF); settle();
    check(n_err == 1 && !locked, "error drops lock");
    send(man(0, 1, 0, 0)); settle();
    check(!trg_lvl, "no decode while unlocked");
    send(CMD_IDLE); send(man(0, 1, 0, 0)); settle();
    check(locked && trg_lvl, "relock and decode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
