`timescale 1ps/1fs
// tb_pedestal_sub: loads random pedestals for every pixel (default geometry),
// streams random samples and checks out = max(sample - pedestal, 0) with the
// row/beat tags, two cycles after the input.
module tb_pedestal_sub;
  import dhp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ped_we = 0, in_valid = 0, out_valid;
  logic [9:0] ped_addr = 0;
  logic [LANES-1:0][7:0] ped_wdata, in_data, out_data;
  logic [7:0] in_row = 0, out_row;
  logic [1:0] in_beat = 0, out_beat;
  int checks = 0, failures = 0;
  logic [LANES-1:0][7:0] ped [ROWS*CH_PER_LANE];

  pedestal_sub dut (.*);
  always #6250 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [LANES-1:0][7:0] d; int r; int b; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_row != 8'(it.r) || out_beat != 2'(it.b)) failures++;
      for (int l = 0; l < LANES; l++) begin
        logic [7:0] p, e;
        p = ped[it.r * CH_PER_LANE + it.b][l];
        e = (it.d[l] > p) ? it.d[l] - p : 8'd0;
        checks++;
        if (out_data[l] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL r%0d l%0d got %0d want %0d", it.r, l, out_data[l], e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < ROWS * CH_PER_LANE; a++) begin
      for (int l = 0; l < LANES; l++) ped[a][l] = 8'($urandom_range(0, 80));
      ped_we <= 1; ped_addr <= 10'(a); ped_wdata <= ped[a];
      @(posedge clk);
    end
    ped_we <= 0;
    for (int n = 0; n < 400; n++) begin
      item_t it;
      it.r = $urandom_range(0, ROWS - 1);
      it.b = $urandom_range(0, CH_PER_LANE - 1);
      for (int l = 0; l < LANES; l++) it.d[l] = 8'($urandom());
      q.push_back(it);
      in_valid <= 1; in_row <= 8'(it.r); in_beat <= 2'(it.b); in_data <= it.d;
      @(posedge clk);
      if (n % 7 == 3) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
