`timescale 1ps/1fs
// dhp_pkg: constants and types shared by the data handling processor core.
//
// Frame geometry follows the command/trigger timing description: a frame has
// 192 rows, a row period is 8 GCK cycles (so a full-frame trigger is 1536 GCK
// cycles). The DCD delivers 256 pixels per row over 64 data lanes, four pixels
// per lane (4:1 output multiplexing). FIFO1 is 64 queues of 256 words in front
// of the merge, FIFO2 holds 4096 words. The command word encoding (Manchester
// pairs, IDLE synchronisation word, calibration trigger prefix) is collected
// here too. Field widths of the hit record are this design's choice.
package dhp_pkg;

  localparam int unsigned ROWS        = 192;   // rows per frame
  localparam int unsigned ROW_CYCLES  = 8;     // GCK cycles per row
  localparam int unsigned LANES       = 64;    // DCD data lanes
  localparam int unsigned CH_PER_LANE = 4;     // pixels per lane and row
  localparam int unsigned COLS        = LANES * CH_PER_LANE;  // 256
  localparam int unsigned ADC_W       = 8;     // DCD ADC sample width
  localparam int unsigned FIFO1_DEPTH = 256;
  localparam int unsigned FIFO2_DEPTH = 4096;

  // Command word: four Manchester pairs <RST|TRG|VTO|FSYNC>, first pair first.
  localparam logic [1:0] MAN_ON    = 2'b10;
  localparam logic [1:0] MAN_OFF   = 2'b01;
  localparam logic [7:0] CMD_IDLE  = 8'b00_01_11_01;   // synchronisation word
  localparam logic [5:0] CMD_CALTRG_PFX = 6'b11_10_00; // followed by FSYNC pair

  // 8b/10b control characters used by the framer (Aurora-style ordered sets)
  localparam logic [7:0] K28_5 = 8'hBC;   // comma, idle
  localparam logic [7:0] K28_2 = 8'h5C;   // start of frame, first character
  localparam logic [7:0] K27_7 = 8'hFB;   // start of frame, second character
  localparam logic [7:0] K29_7 = 8'hFD;   // end of frame, first character
  localparam logic [7:0] K30_7 = 8'hFE;   // end of frame, second character

  typedef struct packed {
    logic [7:0]       row;
    logic [7:0]       col;
    logic [ADC_W-1:0] adc;
  } hit_t;

  typedef enum logic [1:0] {
    FRAME_EVENT = 2'd1,
    FRAME_CALIB = 2'd2
  } frame_kind_e;

endpackage
