`timescale 1ps/1fs
// enc16b20b: 16-bit word to 20-bit link word, two 8b/10b characters.
//
// The upper byte is coded first (it leaves the serializer first, in bits
// [9:0] of the link word, bit 0 first) and the lower byte second, with the
// running disparity carried from the first character to the second and, in a
// register, from word to word. kflag[1] marks the upper byte as a control
// character, kflag[0] the lower. Output is registered: one cycle latency.
module enc16b20b (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] word,
  input  logic [1:0]  kflag,
  output logic [19:0] code
);
  logic       rd, rd_mid, rd_next;
  logic [9:0] c_hi, c_lo;

  enc8b10b u_hi (.din(word[15:8]), .k(kflag[1]), .rd_in(rd),     .code(c_hi), .rd_out(rd_mid));
  enc8b10b u_lo (.din(word[7:0]),  .k(kflag[0]), .rd_in(rd_mid), .code(c_lo), .rd_out(rd_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd   <= 1'b0;
      code <= '0;
    end else begin
      rd   <= rd_next;
      code <= {c_lo, c_hi};
    end
  end

endmodule
