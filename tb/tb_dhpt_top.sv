`timescale 1ps/1fs
// tb_dhpt_top: end-to-end run of the whole design at its default size
// (192 rows, 64 lanes x 4 pixels, FIFO1 256, FIFO2 4096).
//
// The testbench plays the role of the front-end chip and of the controlling
// side: it sends the serial Manchester command words on the differential
// command input, loads random pedestals, and at every row sync (dcd_sync)
// sends one row of 256 pixels on the 64 serial 320 Mbit/s lines, 32 bits per
// line, MSB first. Each pixel is pedestal + a row-wide
// common offset (+ a signal for hits), so after pedestal and common-mode
// correction a hit carries exactly the injected signal and everything else
// is zero. Sequence and checks:
//   1. IDLE words -> decoder lock; FSYNC -> row counter restarts.
//   2. Event: trigger for 1536 cycles with ~2 % hits. Every hit in a row
//      fully inside the window must appear in the event frame with the right
//      row, column and value, and nothing else may appear.
//   3. High occupancy: 50 % hits for 200 rows - FIFO1 and FIFO2 fill and hits
//      are lost (lost1 > 0); the frame still closes once the FIFOs drain.
//   4. Calibration trigger while that frame is still draining: it is held
//      (case B), the buffer is frozen, then the calibration frame must carry
//      rows 0..191 of the newest raw data, re-sorted.
//   5. RST command resets the data path; a broken command word raises
//      cmd_err and drops the lock, the next IDLE restores it. LFSR and clock
//      link patterns. VTO is decoded as a level.
// All the time the serial output is compared bit by bit with the 20-bit
// link words. Each mechanism is counted and a failure is counted for one that
// never happened.
module tb_dhpt_top;
  import dhp_pkg::*;

  logic clk_bit = 0, rst_n = 0;
  real  cmd_p = 1.1, cmd_n = 1.2;
  logic [3:0] cmd_dly = 4'd4;
  logic [LANES-1:0] dcd_data = '0;
  logic dcd_sync;
  logic [2:0] des_phase = 3'd2;
  logic ped_we = 0;
  logic [9:0] ped_addr = 0;
  logic [LANES-1:0][7:0] ped_wdata = '0;
  logic [7:0] cm_thr = 8'd20, hit_thr = 8'd50, row_max = 8'(ROWS - 1);
  logic [1:0] link_sel = 2'b00, drv_sw = 2'b11;
  real ibias_ma = 1.0, ibiasd_ma = 1.0;
  logic word_clk, ser_out, link_out;
  logic [19:0] link_word;
  real tx_p, tx_n;
  logic cmd_locked, cmd_err, rst_lvl, rst_done, vto_lvl, window, busy, wr_inhibit, cal_hold, cm_overrun;
  logic [7:0] rst_words, row, cm_value;
  logic [15:0] lost1, hits_sent, trg_ignored;
  logic [12:0] fifo2_count;
  logic [8:0] fifo1_max;

  dhpt_top dut (.*);

  always #312.5 clk_bit = ~clk_bit;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    #3000000000;   // 3 ms of simulated time
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge word_clk) cyc++;

  // ---------------- command sender ----------------------------------------
  logic [7:0] cmd_q[$];
  logic [7:0] cur_cmd = CMD_IDLE;
  int bitn = 0;
  always @(posedge word_clk) begin
    if (bitn == 0) cur_cmd = (cmd_q.size() > 0) ? cmd_q.pop_front() : CMD_IDLE;
    #1000;
    cmd_p = cur_cmd[7 - bitn] ? 1.3 : 1.1;
    bitn = (bitn + 1) % 8;
  end

  function automatic logic [7:0] man(input bit r, input bit t, input bit v, input bit f);
    return {r ? MAN_ON : MAN_OFF, t ? MAN_ON : MAN_OFF, v ? MAN_ON : MAN_OFF, f ? MAN_ON : MAN_OFF};
  endfunction

  task automatic send_words(input logic [7:0] w, input int n);
    for (int i = 0; i < n; i++) cmd_q.push_back(w);
  endtask

  task automatic wait_cmds();
    wait (cmd_q.size() == 0);
    repeat (16) @(posedge word_clk);
  endtask

  // ---------------- pixel source ------------------------------------------
  logic [7:0] ped  [ROWS][COLS];
  logic [7:0] rawm [ROWS][COLS];    // newest raw data as the buffer should hold it
  int hit_pct = 0;                  // hit probability in percent
  localparam int H = 120;
  typedef struct { int row; int col; int t0; } inj_t;
  inj_t inj[$];
  int cur_r = 0, dbit = -1, dcnt = 0;
  logic [7:0] rowv [COLS];
  bit        rowh [COLS];

  // front-end model: on dcd_sync send the row, 32 bits per line, MSB first,
  // 5 bit-clock cycles per bit (320 Mbit/s); sample s of line l is column l*4+s
  always @(posedge clk_bit) begin
    bit sync;
    sync = dcd_sync;
    #1;
    if (sync) begin
      int off;
      cur_r = int'(row);
      off = 10 + (cyc % 20);
      for (int c = 0; c < COLS; c++) begin
        rowh[c] = ($urandom_range(0, 999) < hit_pct * 10);
        rowv[c] = 8'(int'(ped[cur_r][c]) + off + (rowh[c] ? H : 0));
        if (rowh[c]) begin inj_t x; x.row = cur_r; x.col = c; x.t0 = cyc; inj.push_back(x); end
      end
      dbit = 0; dcnt = 0;
    end else if (dbit >= 0) begin
      dcnt++;
      if (dcnt == 5) begin
        dcnt = 0; dbit++;
        if (dbit == 32) dbit = -1;
      end
    end
    if (dbit >= 0)
      for (int l = 0; l < LANES; l++) dcd_data[l] = rowv[l * CH_PER_LANE + dbit / 8][7 - dbit % 8];
  end

  // raw buffer model: a row is stored when its first beat is written
  always @(posedge word_clk)
    if (dut.pix_valid && dut.pix_beat == 2'd0 && dut.row_wr_ok)
      for (int c = 0; c < COLS; c++) rawm[dut.cur_row][c] = rowv[c];

  // ---------------- window history ----------------------------------------
  int win_open[$], win_close[$];
  logic win_d = 0;
  always @(posedge word_clk) begin
    #2;
    if (window && !win_d) win_open.push_back(cyc);
    if (!window && win_d) win_close.push_back(cyc);
    win_d = window;
  end

  // ---------------- frame monitor (framer words) --------------------------
  typedef enum {M_IDLE, M_HDR, M_BODY} mstate_e;
  mstate_e ms = M_IDLE;
  bit is_cal = 0;
  logic [15:0] body[$];
  int n_event_frames = 0, n_cal_frames = 0;
  logic [15:0] last_event[$], last_cal[$];
  always @(posedge word_clk) begin
    logic [15:0] w;
    logic [1:0] k;
    w = dut.u_framer.word; k = dut.u_framer.kflag;
    if (k == 2'b11 && w == {K28_2, K27_7}) begin ms = M_HDR; body.delete(); end
    else if (k == 2'b11 && w == {K29_7, K30_7}) begin
      if (is_cal) begin last_cal = body; n_cal_frames++; end
      else begin last_event = body; n_event_frames++; end
      ms = M_IDLE;
    end else if (k == 2'b00 && ms == M_HDR) begin
      is_cal = (w[15:14] == 2'b10);
      ms = M_BODY;
    end else if (k == 2'b00 && ms == M_BODY) body.push_back(w);
  end

  // ---------------- serial link check -------------------------------------
  logic [19:0] wq[$];
  int n_ser_words = 0;
  always @(posedge word_clk) if (rst_n) wq.push_back(link_word);
  initial begin
    logic [19:0] got, want;
    wait (rst_n);
    @(posedge dut.load);
    @(posedge clk_bit); #1;
    forever begin
      for (int i = 0; i < 20; i++) begin
        got[i] = ser_out;
        @(posedge clk_bit); #1;
      end
      want = wq.pop_front();
      n_ser_words++;
      if (got !== want) begin failures++; if (failures < 20) $display("FAIL serial word %h want %h", got, want); end
    end
  end

  // ---------------- checks of frames --------------------------------------
  task automatic check_event(input int w0, input int w1);
    // w0/w1: window open/close cycle
    bit found [int];
    int n_req = 0, n_bad = 0;
    for (int i = 0; i + 1 < last_event.size(); i += 2) begin
      int r, c, a;
      r = int'(last_event[i][15:8]); c = int'(last_event[i][7:0]); a = int'(last_event[i + 1][7:0]);
      found[r * 256 + c] = 1;
      if (a != H) n_bad++;
    end
    foreach (inj[i]) begin
      if (inj[i].t0 > w0 + 2 && inj[i].t0 + 24 < w1) begin
        n_req++;
        if (!found.exists(inj[i].row * 256 + inj[i].col)) n_bad++;
      end
    end
    // every reported hit must have been injected
    foreach (found[key]) begin
      bit ok = 0;
      foreach (inj[i]) if (inj[i].row * 256 + inj[i].col == key) ok = 1;
      if (!ok) n_bad++;
    end
    check(n_req > 100, "enough hits inside the window");
    check(n_bad == 0, $sformatf("event frame content (%0d bad of %0d)", n_bad, n_req));
  endtask

  // ---------------- main sequence -----------------------------------------
  int n_err = 0, n_relock = 0, n_vto = 0, n_lock = 0, n_fsync = 0, n_lost = 0, n_hold = 0, n_rst = 0, n_lfsr = 0, n_clkpat = 0, n_ignored = 0;

  initial begin
    int t_on, t_off, f0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) ped[r][c] = 8'($urandom_range(0, 30));
    repeat (10) @(posedge clk_bit);
    rst_n = 1;
    // pedestals
    for (int a = 0; a < ROWS * CH_PER_LANE; a++) begin
      logic [LANES-1:0][7:0] d;
      for (int l = 0; l < LANES; l++) d[l] = ped[a / CH_PER_LANE][l * CH_PER_LANE + a % CH_PER_LANE];
      @(posedge word_clk);
      ped_we <= 1; ped_addr <= 10'(a); ped_wdata <= d;
    end
    @(posedge word_clk); ped_we <= 0;
    // 1. lock and FSYNC
    send_words(CMD_IDLE, 3); wait_cmds();
    if (cmd_locked) n_lock++;
    check(cmd_locked, "command decoder locked");
    send_words(man(0, 0, 0, 1), 1); send_words(man(0, 0, 0, 0), 1);
    @(posedge dut.fsync); n_fsync++;
    @(posedge word_clk); #2 check(row == 0, "FSYNC restarts rows");
    wait_cmds();
    // a full frame of background so the raw buffer holds data everywhere
    repeat (ROWS * ROW_CYCLES) @(posedge word_clk);
    // 2. event with ~2 % hits
    hit_pct = 2;
    inj.delete();
    send_words(man(0, 1, 0, 0), ROWS);   // trigger on for 192 words = 1536 cycles
    send_words(man(0, 0, 0, 0), 2);
    wait (win_close.size() == 1);
    hit_pct = 0;
    wait (n_event_frames == 1);
    check(win_close[0] - win_open[0] >= 1530 && win_close[0] - win_open[0] <= 1542, "trigger width 1536 cycles");
    check_event(win_open[0], win_close[0]);
    // VTO level
    send_words(man(0, 0, 1, 0), 2); send_words(man(0, 0, 0, 0), 1);
    @(posedge vto_lvl); n_vto++;
    wait_cmds();
    // 3. high occupancy
    hit_pct = 50;
    send_words(man(0, 1, 0, 0), 200);
    send_words(man(0, 0, 0, 0), 1);
    wait (win_close.size() == 2);
    hit_pct = 0;
    // 4. calibration trigger while the event frame is still draining
    send_words({CMD_CALTRG_PFX, MAN_OFF}, 1);
    send_words(man(0, 1, 0, 0), 2);      // a physics trigger now must be ignored
    send_words(man(0, 0, 0, 0), 1);
    @(posedge cal_hold);
    n_hold++;
    check(busy && wr_inhibit, "calibration held while event frame drains (case B)");
    wait (trg_ignored != 0); n_ignored++;
    wait (n_event_frames == 2);
    if (lost1 != 0) n_lost++;
    check(lost1 != 0 && fifo1_max == 0, "high occupancy: hits lost, FIFOs drained");
    $display("high occupancy: lost %0d hits, sent %0d", lost1, hits_sent);
    wait (n_cal_frames == 1);
    check(last_cal.size() == ROWS * CH_PER_LANE * LANES / 2, "calibration frame length");
    begin
      int nb = 0;
      for (int r = 0; r < ROWS; r++)
        for (int b = 0; b < CH_PER_LANE; b++)
          for (int w = 0; w < LANES / 2; w++) begin
            logic [15:0] x;
            x = last_cal[(r * CH_PER_LANE + b) * (LANES / 2) + w];
            if (x[15:8] != rawm[r][(2 * w) * CH_PER_LANE + b] || x[7:0] != rawm[r][(2 * w + 1) * CH_PER_LANE + b]) nb++;
          end
      check(nb == 0, $sformatf("calibration data (%0d bad words)", nb));
    end
    repeat (4) @(posedge word_clk);
    #2 check(!wr_inhibit, "write inhibit released");
    // 5. RST command
    send_words(man(1, 0, 0, 0), 2); send_words(man(0, 0, 0, 0), 1);
    @(posedge rst_lvl); n_rst++;
    wait_cmds();
    check(rst_words == 8'd2, "RST width counted in words");
    check(!rst_lvl && fifo2_count == 0 && !busy && lost1 == 0, $sformatf("RST resets the data path %0d %0d %0d %0d", rst_lvl, fifo2_count, busy, lost1));
    // broken word: error, lock lost, regained on the next IDLE
    send_words(8'b11_11_01_01, 1); send_words(CMD_IDLE, 2);
    @(posedge cmd_err); n_err++;
    @(posedge word_clk); #2 check(!cmd_locked, "lock dropped after a broken word");
    wait_cmds();
    if (cmd_locked) n_relock++;
    check(cmd_locked, "relocked on IDLE");
    // link patterns
    link_sel = 2'b01;
    repeat (600) begin
      @(posedge clk_bit); #1;
      if (link_out == dut.u_lfsr.out) n_lfsr++;
    end
    check(n_lfsr == 600, "LFSR pattern on the link");
    link_sel = 2'b10;
    begin
      logic p;
      @(posedge clk_bit); #1; p = link_out;
      repeat (100) begin
        @(posedge clk_bit); #1;
        if (link_out != p) n_clkpat++;
        p = link_out;
      end
    end
    check(n_clkpat == 100, "clock pattern on the link");
    check((tx_p - tx_n) > 0.5 || (tx_p - tx_n) < -0.5, "driver output swing");
    // mechanism counts
    check(n_lock > 0, "lock happened");
    check(n_fsync > 0, "fsync happened");
    check(n_event_frames >= 2, "event frames");
    check(n_lost > 0, "FIFO overflow happened");
    check(n_hold > 0, "calibration hold happened");
    check(n_ignored > 0, "ignored trigger happened");
    check(n_cal_frames > 0, "calibration frame happened");
    check(n_rst > 0, "reset command happened");
    check(n_vto > 0, "veto level happened");
    check(n_err > 0 && n_relock > 0, "broken word and relock happened");
    check(n_ser_words > 1000, "serial words compared");
    $display("mechanisms: vto %0d cmd_err %0d relock %0d lfsr_bits %0d clkpat_bits %0d", n_vto, n_err, n_relock, n_lfsr, n_clkpat);
    $display("mechanisms: lock %0d fsync %0d event %0d overflow %0d hold %0d ignored %0d cal %0d rst %0d serial_words %0d",
             n_lock, n_fsync, n_event_frames, n_lost, n_hold, n_ignored, n_cal_frames, n_rst, n_ser_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
