`timescale 1ps/1fs
// dhpt_top: data handling processor - command input, zero-suppressing data
// processing chain and Gbit link - as one design.
//
// The chip receives the pixel data of one front-end readout chip row by row
// (256 pixels of 8 bits per row, 64 lanes x 4 pixels, one row every 8 core
// cycles), reduces it to a list of hits and sends it out over a 1.6 Gbit/s
// serial link. Data flow, all on the 80 MHz word clock:
//   64 serial lines -> dcd_deser (320 Mbit/s, 4 x 8 bit per row and line)
//   pixel beats -> raw_buffer (two frames, for calibration dumps)
//               -> pedestal_sub -> common_mode -> hit_finder (gated by the
//                  trigger window) -> hit_fifos (FIFO1 x 64, FIFO2)
//               -> framer -> enc16b20b -> serializer20 -> link selector
//               -> cml_driver (pads).
// Commands arrive as one serial Manchester word per row on a low-voltage
// differential line: lvds_rx -> delay_line (phase adjust) -> cmd_decoder ->
// trigger_ctrl, which runs the row/frame counters, the event window and the
// calibration dump.
// Clocks: clk_bit is the 1.6 GHz bit clock from the PLL (not modelled);
// cnt20_load divides it by 20 into the 80 MHz word clock (word_clk) and the
// serializer load pulse. The core and the command line run on word_clk: the
// separate 76.35 MHz command clock of the chip is taken to be the word clock
// here. The RST command resets the data path (not the command decoder).
// Link selector (sel = {S1,S0}): 00 serializer, 01 LFSR pattern, 10 clock
// pattern (bit clock / 2), 11 constant 0.
// JTAG, the switcher sequencer, DACs and the offset memory are not part of
// this model: the pedestal memory and thresholds are plain inputs. dcd_sync
// marks each row start to the front end, which then sends its 32 bits per
// line (see dcd_deser for the bit timing).
module dhpt_top #(
  parameter int unsigned ROWS        = dhp_pkg::ROWS,
  parameter int unsigned ROW_CYCLES  = dhp_pkg::ROW_CYCLES,
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE,
  parameter int unsigned FIFO1_DEPTH = dhp_pkg::FIFO1_DEPTH,
  parameter int unsigned FIFO2_DEPTH = dhp_pkg::FIFO2_DEPTH
) (
  input  logic                  clk_bit,
  input  logic                  rst_n,
  // command line
  input  real                   cmd_p,
  input  real                   cmd_n,
  input  logic [3:0]            cmd_dly,
  // front-end pixel data
  input  logic [LANES-1:0]      dcd_data,    // front-end serial data lines, 320 Mbit/s
  output logic                  dcd_sync,    // row start towards the front end
  input  logic [2:0]            des_phase,   // deserializer sampling phase (0..4)
  // configuration
  input  logic                  ped_we,
  input  logic [9:0]            ped_addr,
  input  logic [LANES-1:0][7:0] ped_wdata,
  input  logic [7:0]            cm_thr,
  input  logic [7:0]            hit_thr,
  input  logic [7:0]            row_max,
  input  logic [1:0]            link_sel,
  input  logic [1:0]            drv_sw,
  input  real                   ibias_ma,
  input  real                   ibiasd_ma,
  // link
  output logic                  word_clk,
  output logic [19:0]           link_word,
  output logic                  ser_out,
  output logic                  link_out,
  output real                   tx_p,
  output real                   tx_n,
  // status
  output logic                  cmd_locked,
  output logic                  cmd_err,
  output logic                  rst_lvl,
  output logic                  rst_done,    // RST released; rst_words = its width
  output logic [7:0]            rst_words,
  output logic                  vto_lvl,
  output logic [7:0]            row,
  output logic                  window,
  output logic                  busy,
  output logic                  wr_inhibit,
  output logic                  cal_hold,
  output logic                  cm_overrun,
  output logic [7:0]            cm_value,
  output logic [15:0]           lost1,
  output logic [$clog2(FIFO2_DEPTH):0] fifo2_count,
  output logic [$clog2(FIFO1_DEPTH):0] fifo1_max,
  output logic [15:0]           hits_sent,
  output logic [15:0]           trg_ignored
);
  import dhp_pkg::*;

  // ---------------- clocks and link --------------------------------------
  logic load, lfsr_out, clk_pat;

  cnt20_load u_cnt (.clk_bit, .rst_n, .f80m(word_clk), .load);

  // ---------------- command path ------------------------------------------
  logic cmd_rx, cmd_bit;
  logic trg_lvl, fsync, caltrg;

  lvds_rx u_cmd_rx (.rx(cmd_p), .rxn(cmd_n), .dout(cmd_rx));
  delay_line #(.SEL_W(4), .T_MIN_PS(0), .T_STEP_PS(208), .SKEW_PS(0)) u_cmd_dly (
    .din(cmd_rx), .sel(cmd_dly), .dout(cmd_bit)
  );

  cmd_decoder u_cmd (
    .clk(word_clk), .rst_n, .cmd_in(cmd_bit),
    .locked(cmd_locked), .rst_lvl, .trg_lvl, .vto_lvl, .fsync, .caltrg,
    .cmd_err, .rst_done, .rst_words
  );

  // data path reset: power-on reset or RST command
  logic core_rst_n;
  always_ff @(posedge word_clk or negedge rst_n) begin
    if (!rst_n) core_rst_n <= 1'b0;
    else        core_rst_n <= !rst_lvl;
  end

  logic       frame_par, row_start, ev_start, ev_stop, dump_start, dump_done;
  logic [7:0] ev_row;

  trigger_ctrl #(.ROWS(ROWS), .ROW_CYCLES(ROW_CYCLES)) u_trg (
    .clk(word_clk), .rst_n(core_rst_n), .trg_lvl, .fsync, .caltrg,
    .framer_busy(busy), .dump_done,
    .row, .row_start, .frame_par, .window, .ev_start, .ev_row, .ev_stop,
    .dump_start, .wr_inhibit, .cal_hold, .trg_ignored
  );

  // ---------------- raw data buffer ---------------------------------------
  logic                  pix_valid;
  logic [1:0]            pix_beat;
  logic [LANES-1:0][7:0] pix_data;

  dcd_deser #(.LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_des (
    .clk_bit, .clk_word(word_clk), .rst_n(core_rst_n), .row_start, .din(dcd_data), .sample_ph(des_phase),
    .dcd_sync, .pix_valid, .pix_beat, .pix_data
  );

  logic [7:0] pix_row_q, cur_row;
  logic       row_wr_ok, row_wr_ok_q, cur_bank, pix_bank_q;
  logic       rd_en;
  logic [7:0] rd_row;
  logic [1:0] rd_beat;
  logic [LANES-1:0][7:0] rd_data;

  // a row is tagged with the row counter and frame bank at its first beat
  // (its last beat arrives in the next row) and written only if the buffer
  // was not frozen at that moment
  assign cur_row   = (pix_beat == 2'd0) ? row : pix_row_q;
  assign cur_bank  = (pix_beat == 2'd0) ? frame_par : pix_bank_q;
  assign row_wr_ok = (pix_beat == 2'd0) ? !wr_inhibit : row_wr_ok_q;

  always_ff @(posedge word_clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      pix_row_q   <= '0;
      pix_bank_q  <= 1'b0;
      row_wr_ok_q <= 1'b0;
    end else if (pix_valid && pix_beat == 2'd0) begin
      pix_row_q   <= row;
      pix_bank_q  <= frame_par;
      row_wr_ok_q <= !wr_inhibit;
    end
  end

  raw_buffer #(.ROWS(ROWS), .LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_raw (
    .clk(word_clk), .rst_n(core_rst_n),
    .wr_en(pix_valid && row_wr_ok), .wr_row(cur_row), .wr_beat(pix_beat),
    .wr_bank(cur_bank), .wr_data(pix_data),
    .rd_en, .rd_row, .rd_beat, .rd_data
  );

  // ---------------- processing chain --------------------------------------
  logic                  p_valid, c_valid;
  logic [7:0]            p_row, c_row;
  logic [1:0]            p_beat, c_beat;
  logic [LANES-1:0][7:0] p_data, c_data;

  pedestal_sub #(.ROWS(ROWS), .LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_ped (
    .clk(word_clk), .rst_n(core_rst_n), .ped_we, .ped_addr, .ped_wdata,
    .in_valid(pix_valid), .in_row(cur_row), .in_beat(pix_beat), .in_data(pix_data),
    .out_valid(p_valid), .out_row(p_row), .out_beat(p_beat), .out_data(p_data)
  );

  common_mode #(.LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_cm (
    .clk(word_clk), .rst_n(core_rst_n), .cm_thr,
    .in_valid(p_valid), .in_row(p_row), .in_beat(p_beat), .in_data(p_data),
    .out_valid(c_valid), .out_row(c_row), .out_beat(c_beat), .out_data(c_data),
    .cm_value, .overrun(cm_overrun)
  );

  logic [LANES-1:0] h_push;
  hit_t [LANES-1:0] h_hit;

  hit_finder #(.LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_hit (
    .clk(word_clk), .rst_n(core_rst_n), .hit_thr, .window,
    .in_valid(c_valid), .in_row(c_row), .in_beat(c_beat), .in_data(c_data),
    .push(h_push), .hit(h_hit)
  );

  logic f2_pop, f2_empty, all_empty;
  hit_t f2_dout;

  hit_fifos #(.LANES(LANES), .FIFO1_DEPTH(FIFO1_DEPTH), .FIFO2_DEPTH(FIFO2_DEPTH)) u_fifos (
    .clk(word_clk), .rst_n(core_rst_n), .push(h_push), .hit(h_hit),
    .pop(f2_pop), .dout(f2_dout), .empty(f2_empty), .all_empty,
    .lost1, .fifo2_count, .fifo1_max
  );

  // ---------------- framing and link --------------------------------------
  logic [15:0] word;
  logic [1:0]  kflag;

  framer #(.LANES(LANES), .CH_PER_LANE(CH_PER_LANE)) u_framer (
    .clk(word_clk), .rst_n(core_rst_n),
    .ev_start, .ev_row, .ev_stop,
    .fifo_empty(f2_empty), .fifo_dout(f2_dout), .fifo_pop(f2_pop), .all_empty,
    .dump_start, .row_max, .rd_en, .rd_row, .rd_beat, .rd_data,
    .word, .kflag, .busy, .dump_done, .hits_sent
  );

  enc16b20b u_enc (.clk(word_clk), .rst_n, .word, .kflag, .code(link_word));

  serializer20 #(.W(20)) u_ser (
    .clk_bit, .clk_word(word_clk), .rst_n, .load, .data(link_word), .out(ser_out)
  );

  lfsr8 u_lfsr (.clk(clk_bit), .rb(rst_n), .out(lfsr_out));

  always_ff @(posedge clk_bit or negedge rst_n) begin
    if (!rst_n) clk_pat <= 1'b0;
    else        clk_pat <= ~clk_pat;
  end

  always_comb begin
    unique case (link_sel)
      2'b00:   link_out = ser_out;
      2'b01:   link_out = lfsr_out;
      2'b10:   link_out = clk_pat;
      default: link_out = 1'b0;
    endcase
  end

  cml_driver u_drv (.d(link_out), .sw(drv_sw), .ibias_ma, .ibiasd_ma, .tx_p, .tx_n);

endmodule
