`timescale 1ps/1fs
// hit_fifos: FIFO1 per lane, round-robin merge, FIFO2.
//
// Each of the LANES hit finder outputs feeds its own FIFO1 (FIFO1_DEPTH, 256
// words). A round-robin arbiter moves one hit per cycle from the next
// non-empty FIFO1 (searching upward from the lane after the last one served)
// into FIFO2 (FIFO2_DEPTH, 4096 words), which the framer reads. When FIFO2 is
// full the merge stalls and FIFO1s fill up; a hit pushed into a full FIFO1
// is lost and counted in lost1 (wraps at 2^16). The depths are the document's; the merge
// order is this design's choice.
//
// all_empty is high when no hit is held anywhere in the two FIFO levels.
module hit_fifos #(
  parameter int unsigned LANES       = dhp_pkg::LANES,
  parameter int unsigned FIFO1_DEPTH = dhp_pkg::FIFO1_DEPTH,
  parameter int unsigned FIFO2_DEPTH = dhp_pkg::FIFO2_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LANES-1:0]          push,
  input  dhp_pkg::hit_t [LANES-1:0] hit,
  input  logic                      pop,
  output dhp_pkg::hit_t             dout,
  output logic                      empty,
  output logic                      all_empty,
  output logic [15:0]               lost1,
  output logic [$clog2(FIFO2_DEPTH):0] fifo2_count,
  output logic [$clog2(FIFO1_DEPTH):0] fifo1_max     // fullest FIFO1
);
  import dhp_pkg::*;
  localparam int unsigned LW = $clog2(LANES);

  logic [LANES-1:0] f1_empty, f1_full, f1_pop;
  logic [$clog2(FIFO1_DEPTH):0] f1_count [LANES];  // per-lane occupancy
  hit_t             f1_dout [LANES];
  logic             f2_full, f2_push;
  hit_t             f2_din;
  logic [LW-1:0]    last;      // lane served last
  logic [LW-1:0]    sel;
  logic             found;

  for (genvar l = 0; l < LANES; l++) begin : g_f1
    sync_fifo #(.WIDTH($bits(hit_t)), .DEPTH(FIFO1_DEPTH)) u_f1 (
      .clk, .rst_n,
      .push(push[l]), .din(hit[l]),
      .pop(f1_pop[l]), .dout(f1_dout[l]),
      .empty(f1_empty[l]), .full(f1_full[l]), .count(f1_count[l])
    );
  end

  // round-robin search for the next non-empty FIFO1
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 1; k <= LANES; k++) begin
      automatic logic [LW-1:0] idx = LW'((32'(last) + k) % LANES);
      if (!found && !f1_empty[idx]) begin
        found = 1'b1;
        sel   = idx;
      end
    end
  end

  assign f2_push = found && !f2_full;
  assign f2_din  = f1_dout[sel];
  always_comb begin
    f1_pop = '0;
    if (f2_push) f1_pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last  <= LW'(LANES - 1);
      lost1 <= '0;
    end else begin
      if (f2_push) last <= sel;
      lost1 <= lost1 + 16'($countones(push & f1_full));
    end
  end

  sync_fifo #(.WIDTH($bits(hit_t)), .DEPTH(FIFO2_DEPTH)) u_f2 (
    .clk, .rst_n,
    .push(f2_push), .din(f2_din),
    .pop, .dout,
    .empty, .full(f2_full), .count(fifo2_count)
  );

  always_comb begin
    fifo1_max = '0;
    for (int l = 0; l < LANES; l++)
      if (f1_count[l] > fifo1_max) fifo1_max = f1_count[l];
  end

  assign all_empty = empty && (&f1_empty);

endmodule
