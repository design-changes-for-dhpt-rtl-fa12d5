`timescale 1ps/1fs
// cmd_decoder: serial command word decoder (GCK domain).
//
// One 8-bit control word is sent per row period, one bit per GCK cycle, first
// bit first. It carries four Manchester coded commands <RST|TRG|VTO|FSYNC>,
// each as a pair: 10 = on, 01 = off. Two further words break the Manchester
// rule on purpose: 00 01 11 01 is the synchronisation word (sent as IDLE) and
// 11 10 00 <FSYNC pair> is the calibration trigger (memory dump), which may
// carry an FSYNC at the same time. RST, TRG and VTO are level sensitive and
// are presented as levels; FSYNC and CALTRG are edge sensitive and give a
// one-cycle pulse when they switch on.
//
// Word alignment (this design's choice, the word boundary is not given): while
// unlocked, the decoder searches every bit position for the IDLE word and
// locks its word boundary there. When locked, a word that is neither valid
// Manchester nor IDLE nor CALTRG raises cmd_err for one cycle and drops the
// lock. IDLE and invalid words leave the command levels unchanged.
// rst_words reports, when RST switches off, for how many words it was on:
// the RST pulse width selects the reset mode, whose meaning is not given.
//
// Latency: outputs change one GCK cycle after the last bit of a word.
module cmd_decoder (
  input  logic       clk,        // GCK
  input  logic       rst_n,
  input  logic       cmd_in,     // serial command bit
  output logic       locked,
  output logic       rst_lvl,
  output logic       trg_lvl,
  output logic       vto_lvl,
  output logic       fsync,      // pulse
  output logic       caltrg,     // pulse
  output logic       cmd_err,    // pulse
  output logic       rst_done,   // pulse when RST switches off
  output logic [7:0] rst_words   // RST width in words, valid with rst_done
);
  import dhp_pkg::*;

  logic [6:0] sh;
  logic [7:0] sh_n;
  logic [2:0] phase;
  logic       fsync_lvl, cal_lvl;

  assign sh_n = {sh[6:0], cmd_in};

  function automatic logic pair_ok(input logic [1:0] p);
    return (p == MAN_ON) || (p == MAN_OFF);
  endfunction

  logic word_end, is_idle, is_cal, is_man;
  assign word_end = locked && (phase == 3'd7);
  assign is_idle  = (sh_n == CMD_IDLE);
  assign is_cal   = (sh_n[7:2] == CMD_CALTRG_PFX) && pair_ok(sh_n[1:0]);
  assign is_man   = pair_ok(sh_n[7:6]) && pair_ok(sh_n[5:4]) &&
                    pair_ok(sh_n[3:2]) && pair_ok(sh_n[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      phase     <= '0;
      locked    <= 1'b0;
      rst_lvl   <= 1'b0;
      trg_lvl   <= 1'b0;
      vto_lvl   <= 1'b0;
      fsync_lvl <= 1'b0;
      cal_lvl   <= 1'b0;
      fsync     <= 1'b0;
      caltrg    <= 1'b0;
      cmd_err   <= 1'b0;
      rst_done  <= 1'b0;
      rst_words <= '0;
    end else begin
      sh       <= sh_n[6:0];
      fsync    <= 1'b0;
      caltrg   <= 1'b0;
      cmd_err  <= 1'b0;
      rst_done <= 1'b0;
      if (!locked) begin
        if (is_idle) begin
          locked <= 1'b1;
          phase  <= 3'd0;
        end
      end else begin
        phase <= phase + 3'd1;
        if (word_end) begin
          if (is_idle) begin
            cal_lvl <= 1'b0;
          end else if (is_cal) begin
            cal_lvl   <= 1'b1;
            caltrg    <= !cal_lvl;
            fsync_lvl <= (sh_n[1:0] == MAN_ON);
            fsync     <= (sh_n[1:0] == MAN_ON) && !fsync_lvl;
          end else if (is_man) begin
            cal_lvl   <= 1'b0;
            rst_lvl   <= (sh_n[7:6] == MAN_ON);
            trg_lvl   <= (sh_n[5:4] == MAN_ON);
            vto_lvl   <= (sh_n[3:2] == MAN_ON);
            fsync_lvl <= (sh_n[1:0] == MAN_ON);
            fsync     <= (sh_n[1:0] == MAN_ON) && !fsync_lvl;
            if (sh_n[7:6] == MAN_ON) begin
              if (!rst_lvl) rst_words <= 8'd1;
              else if (rst_words != 8'hFF) rst_words <= rst_words + 8'd1;
            end else if (rst_lvl) begin
              rst_done <= 1'b1;
            end
          end else begin
            cmd_err <= 1'b1;
            locked  <= 1'b0;
          end
        end
      end
    end
  end

endmodule
