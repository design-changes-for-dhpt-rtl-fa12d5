`timescale 1ps/1fs
// tb_dcd_deser: checks the front-end data deserializer with 8 lanes.
// The word clock comes from the bit-clock divider (cnt20_load); the testbench
// pulses row_start every 8 word cycles and, as the front end, answers each
// dcd_sync with 32 random bits per line, MSB first, 5 bit-clock cycles per
// bit. Checks: every beat carries the samples sent (lane l, sample s), beats
// come in order 0..3, one per row and index, and beat s is sampled by the core
// at the (3 + 2s)-th word-clock edge after the edge that raised row_start.
// Then the sampling phase is moved: phases 1, 3 and 4 (inside the bit) must
// still deliver every sample, phase 0 (on the transition) must not.
module tb_dcd_deser;
  localparam int L = 8;
  logic clk_bit = 0, rst_n = 1, clk_word, load;
  logic row_start = 0;
  logic [L-1:0] din = '0;
  logic [2:0] sample_ph = 3'd2;
  logic dcd_sync, pix_valid;
  logic [1:0] pix_beat;
  logic [L-1:0][7:0] pix_data;
  int checks = 0, failures = 0;

  cnt20_load u_clk (.clk_bit, .rst_n, .f80m(clk_word), .load);
  dcd_deser #(.LANES(L), .CH_PER_LANE(4)) dut (
    .clk_bit, .clk_word, .rst_n, .row_start, .din, .sample_ph, .dcd_sync, .pix_valid, .pix_beat, .pix_data
  );

  always #312.5 clk_bit = ~clk_bit;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // front-end model; rows are kept by number (mod 4) because the last beat of
  // a row is presented after the next row has started
  logic [7:0] smp [4][L][4];
  int dbit = -1, dcnt = 0, rows_sent = 0;
  always @(posedge clk_bit) begin
    bit sync;
    sync = dcd_sync;
    #1;
    if (sync) begin
      rows_sent++;
      for (int l = 0; l < L; l++) for (int s = 0; s < 4; s++) smp[rows_sent % 4][l][s] = 8'($urandom());
      dbit = 0; dcnt = 0;
    end else if (dbit >= 0) begin
      dcnt++;
      if (dcnt == 5) begin dcnt = 0; dbit++; if (dbit == 32) dbit = -1; end
    end
    if (dbit >= 0) for (int l = 0; l < L; l++) din[l] = smp[rows_sent % 4][l][dbit / 8][7 - dbit % 8];
  end

  // row timing and output check in one word-clock process (no ordering races)
  int wcyc = 0, rs_cyc = 0, next_beat = 0, beats = 0, chk_row = 1;
  int skip = 0, bad_ph0 = 0;     // skip: beats ignored after a phase change
  always @(posedge clk_word) begin
    // beat 0 of a row arrives while the front end still sends that row
    if (pix_valid && pix_beat == 2'd0) chk_row = rows_sent;
    if (rst_n && pix_valid && skip > 0) begin
      next_beat = (int'(pix_beat) + 1) % 4;
      skip--;
    end else if (rst_n && pix_valid && sample_ph == 3'd0) begin
      for (int l = 0; l < L; l++) if (pix_data[l] != smp[chk_row % 4][l][pix_beat]) bad_ph0++;
      next_beat = (int'(pix_beat) + 1) % 4;
    end else if (rst_n && pix_valid) begin
      checks++;
      if (pix_beat != 2'(next_beat)) begin failures++; $display("FAIL beat %0d want %0d", pix_beat, next_beat); end
      checks++;
      // wcyc is read before its increment: beat s arrives 2 + 2s counts after
      // the count at which row_start was raised (mod one row)
      if ((wcyc - rs_cyc) % 8 != (2 + 2 * int'(pix_beat)) % 8 &&
          !(sample_ph > 3'd2 && (wcyc - rs_cyc) % 8 == (3 + 2 * int'(pix_beat)) % 8)) begin
        failures++; $display("FAIL beat %0d at cycle %0d", pix_beat, wcyc - rs_cyc);
      end
      for (int l = 0; l < L; l++) begin
        checks++;
        if (pix_data[l] != smp[chk_row % 4][l][pix_beat]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d beat %0d %h want %h", l, pix_beat, pix_data[l], smp[chk_row % 4][l][pix_beat]);
        end
      end
      next_beat = (next_beat + 1) % 4;
      beats++;
    end
    wcyc++;
    row_start <= rst_n && (wcyc % 8 == 0);
    if (rst_n && wcyc % 8 == 0) rs_cyc = wcyc;
  end

  int ph_list[4] = '{1, 3, 4, 0};
  initial begin
    #1 rst_n = 0;   // a real edge, so the asynchronous resets act
    repeat (10) @(posedge clk_bit);
    rst_n = 1;
    wait (rows_sent == 40);
    checks++;
    if (beats < 4 * 38) begin failures++; $display("FAIL only %0d beats", beats); end
    // other sampling phases: 1, 3 and 4 lie inside the bit and must work,
    // phase 0 samples on the bit transition and must deliver wrong data
    foreach (ph_list[i]) begin
      wait (dcd_sync); @(posedge clk_word);
      sample_ph = 3'(ph_list[i]);
      skip = 8;
      wait (rows_sent == 40 + 12 * (i + 1));
    end
    checks++;
    if (bad_ph0 == 0) begin failures++; $display("FAIL phase 0 gave correct data"); end
    checks++;
    if (beats < 4 * 38 + 3 * 4 * 8) begin failures++; $display("FAIL only %0d beats", beats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
