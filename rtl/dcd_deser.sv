`timescale 1ps/1fs
// dcd_deser: deserializer for the front-end (DCD) pixel data links.
//
// The front-end chip digitises 256 pixels per row with 8-bit ADCs and sends
// them through a 4:1 output multiplexer on 64 serial lines at 320 Mbit/s: per
// row and line 4 samples x 8 bits = 32 bits, which take 100 ns at 320 Mbit/s -
// exactly one row period of 8 core cycles. This block turns the 64 lines back
// into beats of 64 parallel 8-bit samples for the processing chain.
//
// How it works: the deserializer clock is the 1.6 GHz bit clock divided by
// BIT_DIV (5 -> 320 MHz), realised as a phase counter on clk_bit. At the
// start of each row (row_start from the row counter, core clock domain) it
// pulses dcd_sync towards the front end for one bit-clock cycle and restarts
// its bit count; the front end then sends bit k of the row during bit-clock
// cycles 5k+1 .. 5k+5 after the sync, and each line is sampled at phase
// sample_ph of its bit (2 = the middle). The chip adjusts the sampling
// moment of its deserializer with programmable delay elements; in this
// clocked model the adjustment is this choice of bit-clock phase. Bits are taken MSB first; every 8 bits
// one beat (all 64 lanes) is complete and is handed to the core clock domain
// through a toggle flag. Sample s of lane l is pixel column l*4 + s.
//
// Interface/timing (sample_ph = 2): beats of a row appear on
// pix_valid/pix_beat/pix_data in core cycles 3, 5, 7 and 9 after row_start
// went high (the last one in the next row), one cycle each. The bit-domain
// hand-over then happens 1 bit-clock cycle before a core clock edge; a later
// phase delays the beats by one core cycle. Beat data and the toggle flag
// change on the same bit-clock edge and stay stable for 40 bit-clock cycles.
// The document gives the line rate, the number of lines and the 4:1 / 8-bit
// structure of the front end; the bit order, the sampling phase and the row
// alignment through dcd_sync are this design's choices.
module dcd_deser #(
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE,
  parameter int unsigned BIT_DIV     = 5
) (
  input  logic                  clk_bit,
  input  logic                  clk_word,
  input  logic                  rst_n,
  input  logic                  row_start,   // core domain, first cycle of a row
  input  logic [LANES-1:0]      din,         // serial lines from the front end
  input  logic [2:0]            sample_ph,   // sampling phase, 0..BIT_DIV-1 bit-clock cycles
  output logic                  dcd_sync,    // row start towards the front end
  output logic                  pix_valid,   // core domain
  output logic [1:0]            pix_beat,
  output logic [LANES-1:0][7:0] pix_data
);
  localparam int unsigned NBITS = CH_PER_LANE * 8;
  localparam int unsigned PW    = $clog2(BIT_DIV);
  localparam int unsigned BW    = $clog2(NBITS);

  logic                  rs_d, active, tgl;
  logic [PW-1:0]         ph;
  logic [BW-1:0]         bitn;
  logic [LANES-1:0][7:0] sh, beat_q;
  logic [1:0]            beat_idx;

  // bit-clock domain: sampling
  always_ff @(posedge clk_bit or negedge rst_n) begin
    if (!rst_n) begin
      rs_d     <= 1'b0;
      active   <= 1'b0;
      ph       <= '0;
      bitn     <= '0;
      dcd_sync <= 1'b0;
      tgl      <= 1'b0;
      beat_idx <= '0;
      sh       <= '0;
      beat_q   <= '0;
    end else begin
      rs_d     <= row_start;
      dcd_sync <= 1'b0;
      // sampling; the last bit of a row may be sampled on the very edge at
      // which the next row restarts the counters
      if (active && ph == PW'(sample_ph)) begin
        for (int l = 0; l < LANES; l++) sh[l] <= {sh[l][6:0], din[l]};
        if (bitn[2:0] == 3'd7) begin
          for (int l = 0; l < LANES; l++) beat_q[l] <= {sh[l][6:0], din[l]};
          beat_idx <= 2'(bitn >> 3);
          tgl      <= ~tgl;
        end
      end
      if (row_start && !rs_d) begin
        active   <= 1'b1;
        ph       <= '0;
        bitn     <= '0;
        dcd_sync <= 1'b1;
      end else if (active) begin
        if (ph == PW'(BIT_DIV - 1)) begin
          ph   <= '0;
          bitn <= bitn + 1'b1;
          if (bitn == BW'(NBITS - 1)) active <= 1'b0;
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

  // core clock domain: hand-over
  logic tgl_q;
  always_ff @(posedge clk_word or negedge rst_n) begin
    if (!rst_n) begin
      tgl_q     <= 1'b0;
      pix_valid <= 1'b0;
      pix_beat  <= '0;
      pix_data  <= '0;
    end else begin
      tgl_q     <= tgl;
      pix_valid <= tgl ^ tgl_q;
      pix_beat  <= beat_idx;
      pix_data  <= beat_q;
    end
  end

endmodule
