`timescale 1ps/1fs
// common_mode: two-pass common mode correction per row.
//
// The common mode is the offset shared by all pixels of a row. It is
// estimated in two passes over the row's COLS samples: pass 1 takes the
// mean of all samples; pass 2 takes the mean of only those samples not above
// mean1 + cm_thr, so that pixels carrying a signal (hits) do not pull the
// estimate up. The pass-2 mean is then subtracted from every sample of the
// row, clamped at 0. That the correction works on whole rows and how the two
// passes are defined is this design's reading of "common mode (two pass)".
//
// Structure: beats (CH_PER_LANE per row, LANES samples each) are written into
// one of two row buffers while pass 1 accumulates; after the row's last beat,
// one cycle evaluates pass 2 over the stored row, then the corrected row
// leaves as CH_PER_LANE beats on consecutive cycles while the next row fills
// the other buffer. Beats of a row must arrive in order 0..CH_PER_LANE-1 and
// rows at least CH_PER_LANE+1 cycles apart (the DCD gives 8 cycles per row).
//
// Latency: first corrected beat two cycles after the row's last input beat.
module common_mode #(
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            cm_thr,
  input  logic                  in_valid,
  input  logic [7:0]            in_row,
  input  logic [1:0]            in_beat,
  input  logic [LANES-1:0][7:0] in_data,
  output logic                  out_valid,
  output logic [7:0]            out_row,
  output logic [1:0]            out_beat,
  output logic [LANES-1:0][7:0] out_data,
  output logic [7:0]            cm_value,   // last common mode (debug)
  output logic                  overrun     // a row arrived while both buffers busy
);
  localparam int unsigned COLS = LANES * CH_PER_LANE;
  localparam int unsigned SW   = $clog2(COLS) + 8;

  logic [LANES-1:0][7:0] buf_q [2][CH_PER_LANE];
  logic [7:0]            buf_row [2];
  logic [SW-1:0]         sum1;
  logic                  wbank;
  logic [1:0]            full;          // buffer holds a complete row
  logic                  calc;          // pass 2 this cycle
  logic                  calc_bank;
  logic                  obusy;
  logic                  obank;
  logic [1:0]            ocnt;
  logic [7:0]            cm;
  logic [SW-1:0]         sum1_row [2];

  // pass 2 over the row in buffer calc_bank
  logic [SW-1:0] mean1, sum2, cnt2;
  logic [7:0]    cm_next;
  always_comb begin
    mean1 = sum1_row[calc_bank] / SW'(COLS);
    sum2  = '0;
    cnt2  = '0;
    for (int b = 0; b < CH_PER_LANE; b++)
      for (int l = 0; l < LANES; l++)
        if (SW'(buf_q[calc_bank][b][l]) <= mean1 + SW'(cm_thr)) begin
          sum2 = sum2 + SW'(buf_q[calc_bank][b][l]);
          cnt2 = cnt2 + SW'(1);
        end
    cm_next = (cnt2 != '0) ? 8'(sum2 / cnt2) : 8'(mean1);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_q[wbank][in_beat] <= in_data;
      if (in_beat == 2'd0) buf_row[wbank] <= in_row;
    end
  end

  logic [SW-1:0] beat_sum;
  always_comb begin
    beat_sum = '0;
    for (int l = 0; l < LANES; l++) beat_sum = beat_sum + SW'(in_data[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum1      <= '0;
      wbank     <= 1'b0;
      full      <= '0;
      calc      <= 1'b0;
      calc_bank <= 1'b0;
      obusy     <= 1'b0;
      obank     <= 1'b0;
      ocnt      <= '0;
      cm        <= '0;
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      sum1_row[0] <= '0;
      sum1_row[1] <= '0;
    end else begin
      calc      <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_beat == 2'd0 && full[wbank]) overrun <= 1'b1;
        if (in_beat == 2'(CH_PER_LANE - 1)) begin
          sum1_row[wbank] <= ((in_beat == 2'd0) ? '0 : sum1) + beat_sum;
          full[wbank]     <= 1'b1;
          calc            <= 1'b1;
          calc_bank       <= wbank;
          wbank           <= ~wbank;
          sum1            <= '0;
        end else begin
          sum1 <= ((in_beat == 2'd0) ? '0 : sum1) + beat_sum;
        end
      end
      if (calc) begin
        cm    <= cm_next;
        obusy <= 1'b1;
        obank <= calc_bank;
        ocnt  <= '0;
      end
      if (obusy) begin
        out_valid <= 1'b1;
        ocnt      <= ocnt + 2'd1;
        if (ocnt == 2'(CH_PER_LANE - 1)) begin
          obusy       <= 1'b0;
          full[obank] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    out_row  <= buf_row[obank];
    out_beat <= ocnt;
    for (int l = 0; l < LANES; l++)
      out_data[l] <= (buf_q[obank][ocnt][l] > cm) ? buf_q[obank][ocnt][l] - cm : 8'd0;
  end

  assign cm_value = cm;

endmodule
