`timescale 1ps/1fs
// tb_framer: drives the framer with a modelled FIFO2 and raw buffer (8 lanes)
// and decodes its word stream. Event frame: SOF, header with frame number and
// first row, every hit as {row,col},{0,adc} in FIFO order, EOF only after the
// trigger is off, the drain time has passed and the FIFOs are empty.
// Calibration frame: SOF, header with row_max, then rows 0..row_max, four
// beats each, LANES/2 words per beat with the raw samples, EOF, dump_done;
// its length must be 3 + (row_max+1)*4*(1+LANES/2) words.
module tb_framer;
  import dhp_pkg::*;
  localparam int L = 8, NW = L / 2, DRAIN = 16;
  logic clk = 0, rst_n = 0;
  logic ev_start = 0, ev_stop = 0, dump_start = 0;
  logic [7:0] ev_row = 0, row_max = 8'd5;
  logic fifo_empty, fifo_pop, all_empty;
  hit_t fifo_dout;
  logic rd_en;
  logic [7:0] rd_row;
  logic [1:0] rd_beat;
  logic [L-1:0][7:0] rd_data;
  logic [15:0] word, hits_sent;
  logic [1:0] kflag;
  logic busy, dump_done;
  int checks = 0, failures = 0;

  framer #(.LANES(L), .CH_PER_LANE(4), .DRAIN(DRAIN)) dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO2 model
  hit_t fq[$];
  bit   extra_busy = 0;   // models hits still in FIFO1
  assign fifo_empty = (fq.size() == 0);
  assign fifo_dout  = fifo_empty ? hit_t'(0) : fq[0];
  assign all_empty  = fifo_empty && !extra_busy;
  always @(posedge clk) if (fifo_pop && fq.size() > 0) void'(fq.pop_front());

  // raw buffer model: value = row*16 + beat*4 + lane (mod 256), 1-cycle read
  always @(posedge clk) if (rd_en)
    for (int l = 0; l < L; l++) rd_data[l] <= 8'(int'(rd_row) * 16 + int'(rd_beat) * 4 + l + 7);

  // collect the stream
  logic [17:0] stream[$];   // {kflag, word}
  always @(posedge clk) begin
    #1;
    stream.push_back({kflag, word});
  end

  localparam logic [17:0] IDLE = {2'b11, K28_5, K28_5};
  localparam logic [17:0] SOF  = {2'b11, K28_2, K27_7};
  localparam logic [17:0] EOF  = {2'b11, K29_7, K30_7};

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // strip idles and return the frame between SOF and EOF (inclusive)
  function automatic int find(input logic [17:0] w, input int from);
    for (int i = from; i < stream.size(); i++) if (stream[i] == w) return i;
    return -1;
  endfunction

  initial begin
    hit_t h [$];
    int s, e, i, n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // ---- event frame
    ev_row <= 8'd42; ev_start <= 1; @(posedge clk); ev_start <= 0;
    for (int k = 0; k < 10; k++) begin
      hit_t x;
      x.row = 8'(42 + k); x.col = 8'(k * 3); x.adc = 8'(200 + k);
      h.push_back(x); fq.push_back(x);
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    extra_busy = 1;
    ev_stop <= 1; @(posedge clk); ev_stop <= 0;
    repeat (DRAIN + 10) @(posedge clk);
    #2 check(busy, "frame stays open while FIFO1 holds hits");
    begin hit_t x; x.row = 8'd99; x.col = 8'd1; x.adc = 8'd77; h.push_back(x); fq.push_back(x); end
    extra_busy = 0;
    repeat (10) @(posedge clk);
    #2 check(!busy, "frame closed");
    s = find(SOF, 0); e = find(EOF, 0);
    check(s >= 0 && e > s, "SOF and EOF present");
    check(stream[s + 1] == {2'b00, 2'b01, 6'd0, 8'd42}, "event header");
    i = s + 2; n = 0;
    while (i < e) begin
      if (stream[i] == IDLE) begin i++; continue; end
      check(n < h.size() && stream[i] == {2'b00, h[n].row, h[n].col} &&
            stream[i + 1] == {2'b00, 8'h00, h[n].adc}, "hit words");
      i += 2; n++;
    end
    check(n == h.size() && hits_sent == 16'(h.size()), "all hits sent");
    // ---- calibration frame
    stream.delete();
    dump_start <= 1; @(posedge clk); dump_start <= 0;
    @(posedge dump_done); @(posedge clk); #2;
    s = find(SOF, 0); e = find(EOF, 0);
    check(s >= 0 && e > s, "cal SOF/EOF");
    check(e - s + 1 == 3 + (int'(row_max) + 1) * 4 * (1 + NW), "cal frame length");
    check(stream[s + 1] == {2'b00, 2'b10, 6'd1, row_max}, "cal header");
    i = s + 2;
    for (int r = 0; r <= int'(row_max); r++)
      for (int b = 0; b < 4; b++) begin
        check(stream[i] == IDLE, "read slot");
        i++;
        for (int w = 0; w < NW; w++) begin
          logic [7:0] v0, v1;
          v0 = 8'(r * 16 + b * 4 + 2 * w + 7);
          v1 = 8'(r * 16 + b * 4 + 2 * w + 8);
          check(stream[i] == {2'b00, v0, v1}, "cal data");
          i++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
