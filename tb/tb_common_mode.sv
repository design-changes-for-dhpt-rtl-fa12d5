`timescale 1ps/1fs
// tb_common_mode: rows of 256 samples = common offset + noise, with a few
// large hits, sent as 4 beats every 8 cycles. The testbench computes the
// two-pass estimate itself (mean of all samples; mean of the samples not
// above mean + threshold) and checks every corrected sample, the row tag,
// and that the first corrected beat appears two cycles after the last input
// beat. Checks also that the hits do not bias the estimate (it stays within
// the offset + noise range).
module tb_common_mode;
  import dhp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] cm_thr = 8'd10;
  logic in_valid = 0, out_valid, overrun;
  logic [7:0] in_row = 0, out_row, cm_value;
  logic [1:0] in_beat = 0, out_beat;
  logic [LANES-1:0][7:0] in_data, out_data;
  int checks = 0, failures = 0;

  common_mode dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [7:0] v [CH_PER_LANE][LANES]; int r; int cm; int t_last; } row_t;
  row_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int ref_cm(row_t x);
    int s1 = 0, s2 = 0, n2 = 0, m1;
    for (int b = 0; b < CH_PER_LANE; b++) for (int l = 0; l < LANES; l++) s1 += x.v[b][l];
    m1 = s1 / COLS;
    for (int b = 0; b < CH_PER_LANE; b++) for (int l = 0; l < LANES; l++)
      if (x.v[b][l] <= m1 + cm_thr) begin s2 += x.v[b][l]; n2++; end
    return (n2 > 0) ? s2 / n2 : m1;
  endfunction

  int ob = 0;
  row_t cur;
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      if (ob == 0) begin
        cur = q.pop_front();
        checks++;
        if (cyc - cur.t_last != 2) begin failures++; $display("FAIL latency %0d", cyc - cur.t_last); end
      end
      checks++;
      if (out_row != 8'(cur.r) || out_beat != 2'(ob)) failures++;
      for (int l = 0; l < LANES; l++) begin
        int e;
        e = int'(cur.v[ob][l]) - cur.cm;
        if (e < 0) e = 0;
        checks++;
        if (out_data[l] !== 8'(e)) begin
          failures++;
          if (failures < 5) $display("FAIL row %0d beat %0d lane %0d got %0d want %0d", cur.r, ob, l, out_data[l], e);
        end
      end
      ob = (ob + 1) % CH_PER_LANE;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 30; r++) begin
      row_t x;
      int off;
      off = $urandom_range(20, 60);
      x.r = r;
      for (int b = 0; b < CH_PER_LANE; b++) for (int l = 0; l < LANES; l++) begin
        x.v[b][l] = 8'(off + $urandom_range(0, 6));
        if ($urandom_range(0, 99) < 3) x.v[b][l] = 8'(200 + $urandom_range(0, 50));
      end
      x.cm = ref_cm(x);
      checks++;
      if (x.cm < off || x.cm > off + 6) begin failures++; $display("FAIL estimate %0d offset %0d", x.cm, off); end
      for (int b = 0; b < CH_PER_LANE; b++) begin
        logic [LANES-1:0][7:0] d;
        for (int l = 0; l < LANES; l++) d[l] = x.v[b][l];
        in_valid <= 1; in_row <= 8'(r); in_beat <= 2'(b); in_data <= d;
        @(posedge clk);
        #1;
      end
      x.t_last = cyc;
      q.push_back(x);
      in_valid <= 0;
      repeat (ROW_CYCLES - CH_PER_LANE) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++; if (q.size() != 0 || overrun) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
