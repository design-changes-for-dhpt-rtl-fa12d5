`timescale 1ps/1fs
// framer: builds the data frames sent over the Gbit link.
//
// Output is one 16-bit word per core clock with a K flag per byte (the upper
// byte is sent first); an 8b/10b encoder after it makes the 20-bit link word.
// Between frames the framer sends comma idles (K28.5 K28.5). A frame starts
// with the ordered set K28.2 K27.7 and ends with K29.7 K30.7, in the manner of
// the Aurora framing the chip uses; the word formats below are this design's.
//
// Event data frame (ev_start .. FIFOs drained after ev_stop):
//   SOF, header {2'b01, frame_no[5:0], first_row[7:0]},
//   per hit two words {row, col} and {8'h00, adc}; idles fill gaps.
//   After ev_stop the framer waits DRAIN cycles for the processing pipeline to
//   empty, then closes the frame once FIFO1 and FIFO2 are empty: the link can
//   therefore outlast the trigger.
// Calibration data frame (dump_start):
//   SOF, header {2'b10, frame_no[5:0], row_max[7:0]}, then for rows
//   0..row_max and each of the CH_PER_LANE beats of a row the raw samples of
//   all lanes, two per word {lane 2j, lane 2j+1}, read from the raw buffer
//   (the buffer returns the newest copy of each row, i.e. the re-sorted frame),
//   then EOF and a dump_done pulse. Each beat costs one read cycle (idle word)
//   plus LANES/2 data words.
// busy is high from the event or dump start until the frame's EOF word.
module framer #(
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned CH_PER_LANE = dhp_pkg::CH_PER_LANE,
  parameter int unsigned DRAIN       = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ev_start,
  input  logic [7:0]            ev_row,
  input  logic                  ev_stop,
  input  logic                  fifo_empty,
  input  dhp_pkg::hit_t         fifo_dout,
  output logic                  fifo_pop,
  input  logic                  all_empty,
  input  logic                  dump_start,
  input  logic [7:0]            row_max,
  output logic                  rd_en,
  output logic [7:0]            rd_row,
  output logic [1:0]            rd_beat,
  input  logic [LANES-1:0][7:0] rd_data,
  output logic [15:0]           word,
  output logic [1:0]            kflag,
  output logic                  busy,
  output logic                  dump_done,
  output logic [15:0]           hits_sent
);
  import dhp_pkg::*;
  localparam int unsigned NW  = LANES / 2;
  localparam int unsigned NWW = (NW > 1) ? $clog2(NW) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_EV_SOF, S_EV_HDR, S_EV_DATA, S_EV_EOF,
    S_CAL_SOF, S_CAL_HDR, S_CAL_READ, S_CAL_DATA, S_CAL_EOF
  } state_e;

  state_e         st;
  logic [5:0]     frame_no;
  logic [7:0]     hdr_row;
  logic           stop_seen;
  logic [7:0]     drain;
  logic           half;        // second word of a hit
  logic [NWW-1:0] widx;
  logic [7:0]     r;
  logic [1:0]     b;

  localparam logic [15:0] W_IDLE = {K28_5, K28_5};
  localparam logic [15:0] W_SOF  = {K28_2, K27_7};
  localparam logic [15:0] W_EOF  = {K29_7, K30_7};

  assign busy = (st != S_IDLE);

  // raw buffer read of beat (r, b) during S_CAL_READ; data valid next cycle
  assign rd_en   = (st == S_CAL_READ);
  assign rd_row  = r;
  assign rd_beat = b;

  always_comb begin
    fifo_pop = 1'b0;
    if (st == S_EV_DATA && !fifo_empty && half) fifo_pop = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      frame_no  <= '0;
      hdr_row   <= '0;
      stop_seen <= 1'b0;
      drain     <= '0;
      half      <= 1'b0;
      widx      <= '0;
      r         <= '0;
      b         <= '0;
      word      <= W_IDLE;
      kflag     <= 2'b11;
      dump_done <= 1'b0;
      hits_sent <= '0;
    end else begin
      word      <= W_IDLE;
      kflag     <= 2'b11;
      dump_done <= 1'b0;
      if (ev_stop) stop_seen <= 1'b1;
      if (stop_seen && drain != 8'(DRAIN)) drain <= drain + 8'd1;
      unique case (st)
        S_IDLE: begin
          if (dump_start) begin
            st <= S_CAL_SOF;
          end else if (ev_start) begin
            st        <= S_EV_SOF;
            hdr_row   <= ev_row;
            stop_seen <= ev_stop;
            drain     <= '0;
            half      <= 1'b0;
          end
        end
        S_EV_SOF: begin
          word <= W_SOF;
          st   <= S_EV_HDR;
        end
        S_EV_HDR: begin
          word  <= {2'b01, frame_no, hdr_row};
          kflag <= 2'b00;
          st    <= S_EV_DATA;
        end
        S_EV_DATA: begin
          if (!fifo_empty) begin
            kflag <= 2'b00;
            if (!half) word <= {fifo_dout.row, fifo_dout.col};
            else begin
              word      <= {8'h00, fifo_dout.adc};
              hits_sent <= hits_sent + 16'd1;
            end
            half <= ~half;
          end else if (stop_seen && drain == 8'(DRAIN) && all_empty) begin
            st <= S_EV_EOF;
          end
        end
        S_EV_EOF: begin
          word      <= W_EOF;
          frame_no  <= frame_no + 6'd1;
          stop_seen <= 1'b0;
          st        <= S_IDLE;
        end
        S_CAL_SOF: begin
          word <= W_SOF;
          r    <= '0;
          b    <= '0;
          st   <= S_CAL_HDR;
        end
        S_CAL_HDR: begin
          word  <= {2'b10, frame_no, row_max};
          kflag <= 2'b00;
          st    <= S_CAL_READ;
        end
        S_CAL_READ: begin
          widx    <= '0;
          st      <= S_CAL_DATA;
        end
        S_CAL_DATA: begin
          // rd_data holds beat (r, b) from the read issued one cycle earlier
          word  <= {rd_data[2*widx], rd_data[2*widx+1]};
          kflag <= 2'b00;
          widx  <= widx + 1'b1;
          if (widx == NWW'(NW - 1)) begin
            if (b == 2'(CH_PER_LANE - 1)) begin
              b <= '0;
              if (r == row_max) st <= S_CAL_EOF;
              else begin
                r  <= r + 8'd1;
                st <= S_CAL_READ;
              end
            end else begin
              b  <= b + 2'd1;
              st <= S_CAL_READ;
            end
          end
        end
        S_CAL_EOF: begin
          word      <= W_EOF;
          frame_no  <= frame_no + 6'd1;
          dump_done <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
