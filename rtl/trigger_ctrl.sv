`timescale 1ps/1fs
// trigger_ctrl: row/frame timing, physics trigger window and calibration
// (memory dump) sequencing.
//
// Row timing: a row lasts ROW_CYCLES (8) GCK cycles and a frame ROWS (192)
// rows; FSYNC restarts the count at row 0 and starts a new frame (frame
// parity toggles). Without FSYNC the counters wrap on their own.
//
// Physics trigger: TRG is level sensitive and its width selects how much of
// the raw data stream goes into the event data frame (default 1536 GCK cycles,
// one full frame). A rising TRG opens the event window (ev_start, with the
// current row as the first row of the event); the falling edge closes it
// (ev_stop). The framer may keep sending after that until the FIFOs are empty.
// A trigger arriving while the framer is still busy or a calibration is
// pending is ignored (trg_ignored counts them) - the document asks the
// controlling side to suppress physics triggers around calibrations.
//
// Calibration trigger: CALTRG freezes the raw data buffer at once (wr_inhibit)
// and requests a calibration data frame. If the previous event frame is still
// being sent, the request is held until the framer is idle (FIFOs flushed);
// then dump_start is pulsed. wr_inhibit is released by dump_done.
//
// All outputs are registered; ev_start/ev_stop/dump_start are one-cycle pulses.
module trigger_ctrl #(
  parameter int unsigned ROWS       = dhp_pkg::ROWS,
  parameter int unsigned ROW_CYCLES = dhp_pkg::ROW_CYCLES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trg_lvl,
  input  logic       fsync,
  input  logic       caltrg,
  input  logic       framer_busy,
  input  logic       dump_done,
  output logic [7:0] row,
  output logic       row_start,     // first cycle of a row
  output logic       frame_par,     // frame parity (raw buffer bank)
  output logic       window,        // event window open: hits are kept
  output logic       ev_start,
  output logic [7:0] ev_row,        // first row of the event
  output logic       ev_stop,
  output logic       dump_start,
  output logic       wr_inhibit,
  output logic       cal_hold,      // calibration waiting for the link
  output logic [15:0] trg_ignored
);
  localparam int unsigned CCW = (ROW_CYCLES > 1) ? $clog2(ROW_CYCLES) : 1;

  logic [CCW-1:0] cyc;
  logic           trg_d;
  logic           cal_pend, cal_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc        <= '0;
      row        <= '0;
      frame_par  <= 1'b0;
      row_start  <= 1'b0;
    end else begin
      row_start <= 1'b0;
      if (fsync) begin
        cyc       <= '0;
        row       <= '0;
        frame_par <= ~frame_par;
        row_start <= 1'b1;
      end else if (cyc == CCW'(ROW_CYCLES - 1)) begin
        cyc       <= '0;
        row_start <= 1'b1;
        if (row == 8'(ROWS - 1)) begin
          row       <= '0;
          frame_par <= ~frame_par;
        end else begin
          row <= row + 8'd1;
        end
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trg_d       <= 1'b0;
      window      <= 1'b0;
      ev_start    <= 1'b0;
      ev_stop     <= 1'b0;
      ev_row      <= '0;
      cal_pend    <= 1'b0;
      cal_run     <= 1'b0;
      dump_start  <= 1'b0;
      wr_inhibit  <= 1'b0;
      trg_ignored <= '0;
    end else begin
      trg_d      <= trg_lvl;
      ev_start   <= 1'b0;
      ev_stop    <= 1'b0;
      dump_start <= 1'b0;

      if (trg_lvl && !trg_d) begin
        if (!framer_busy && !cal_pend && !cal_run && !caltrg) begin
          window   <= 1'b1;
          ev_start <= 1'b1;
          ev_row   <= row;
        end else begin
          trg_ignored <= trg_ignored + 16'd1;
        end
      end else if (!trg_lvl && trg_d && window) begin
        window  <= 1'b0;
        ev_stop <= 1'b1;
      end

      if (caltrg && !cal_pend && !cal_run) begin
        cal_pend   <= 1'b1;
        wr_inhibit <= 1'b1;
      end else if (cal_pend && !framer_busy && !window && !ev_stop) begin
        cal_pend   <= 1'b0;
        cal_run    <= 1'b1;
        dump_start <= 1'b1;
      end else if (cal_run && dump_done) begin
        cal_run    <= 1'b0;
        wr_inhibit <= 1'b0;
      end
    end
  end

  assign cal_hold = cal_pend;

endmodule
