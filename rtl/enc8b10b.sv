`timescale 1ps/1fs
// enc8b10b: 8b/10b line encoder (combinational) with running disparity.
//
// The link framing is of the Aurora kind, whose line code is 8b/10b: the
// byte HGF EDCBA is coded as a 6-bit group abcdei (from EDCBA) and a 4-bit
// group fghj (from HGF), each chosen by the running disparity (rd_in, 1 =
// positive) so that the line stays DC balanced and has no run longer than
// five. k selects a control character; K28.y, K23.7, K27.7, K29.7 and K30.7
// are supported. code[0] is bit a, the first bit on the line, matching the
// LSB-first serializer. The code tables are the standard ones; the document
// names the framing only.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  logic [4:0] x;   // EDCBA
  logic [2:0] y;   // HGF
  logic [5:0] c6;  // abcdei, a in bit 5
  logic [3:0] c4;  // fghj,   f in bit 3
  logic       rd6; // disparity after the 6-bit group
  logic [9:0] msb_first;

  assign x = din[4:0];
  assign y = din[7:5];

  // 5b/6b table, column for negative running disparity
  function automatic logic [5:0] tbl6(input logic [4:0] v);
    case (v)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b table for data, column for negative running disparity
  function automatic logic [3:0] tbl4(input logic [2:0] v);
    case (v)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  always_comb begin
    c6 = '0;
    c4 = '0;
    rd6 = rd_in;
    if (k) begin
      // control characters: the whole 10-bit code, negative-disparity form
      case ({x, y})
        {5'd28, 3'd0}: msb_first = 10'b001111_0100;
        {5'd28, 3'd1}: msb_first = 10'b001111_1001;
        {5'd28, 3'd2}: msb_first = 10'b001111_0101;
        {5'd28, 3'd3}: msb_first = 10'b001111_0011;
        {5'd28, 3'd4}: msb_first = 10'b001111_0010;
        {5'd28, 3'd5}: msb_first = 10'b001111_1010;
        {5'd28, 3'd6}: msb_first = 10'b001111_0110;
        {5'd28, 3'd7}: msb_first = 10'b001111_1000;
        {5'd23, 3'd7}: msb_first = 10'b111010_1000;
        {5'd27, 3'd7}: msb_first = 10'b110110_1000;
        {5'd29, 3'd7}: msb_first = 10'b101110_1000;
        default:       msb_first = 10'b011110_1000;   // K30.7
      endcase
      if (rd_in) msb_first = ~msb_first;
      rd_out = ($countones(msb_first) == 5) ? rd_in : ~rd_in;
    end else begin
      // 6-bit group
      c6 = tbl6(x);
      if (rd_in && ($countones(c6) != 3 || x == 5'd7)) c6 = ~c6;
      rd6 = ($countones(c6) == 3) ? rd_in : ~rd_in;
      // 4-bit group, with the alternate D.x.A7 code where a run of five
      // would otherwise cross the group boundary
      c4 = tbl4(y);
      if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
        c4 = 4'b0111;
      if (rd6 && ($countones(c4) != 2 || y == 3'd3)) c4 = ~c4;
      rd_out = ($countones(c4) == 2) ? rd6 : ~rd6;
      msb_first = {c6, c4};
    end
    for (int i = 0; i < 10; i++) code[i] = msb_first[9 - i];
  end

endmodule
