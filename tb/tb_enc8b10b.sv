`timescale 1ps/1fs
// tb_enc8b10b: checks the 8b/10b encoder against published code words
// (K28.5, D0.0, D21.5, D7.7 and others, both disparities) and against the
// properties of the code for all 256 data bytes in both disparities: each
// code word has 4, 5 or 6 ones, its sign agrees with the running disparity,
// rd_out flips exactly when the word is unbalanced, and the 256 words of one
// disparity are all different. A random stream must never run more than five
// equal bits and must keep the running digital sum within +-3 (+-1 at
// character boundaries).
module tb_enc8b10b;
  logic [7:0] din;
  logic k, rd_in, rd_out;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected code as written in tables: abcdei fghj, a first
  function automatic logic [9:0] line(input logic [9:0] tbl);
    logic [9:0] c;
    for (int i = 0; i < 10; i++) c[i] = tbl[9 - i];
    return c;
  endfunction

  task automatic known(input logic [7:0] d, input logic kk, input logic rd, input logic [9:0] tbl);
    din = d; k = kk; rd_in = rd; #1;
    checks++;
    if (code !== line(tbl)) begin
      failures++;
      $display("FAIL %s%0d.%0d rd%0d got %b want %b", kk ? "K" : "D", d[4:0], d[7:5], rd, code, line(tbl));
    end
  endtask

  initial begin
    bit seen [1024];
    int run, last, sum;
    known(8'hBC, 1, 0, 10'b0011111010); known(8'hBC, 1, 1, 10'b1100000101);
    known(8'h00, 0, 0, 10'b1001110100); known(8'h00, 0, 1, 10'b0110001011);
    known(8'hB5, 0, 0, 10'b1010101010); known(8'hB5, 0, 1, 10'b1010101010);
    known(8'hE7, 0, 0, 10'b1110001110); known(8'hE7, 0, 1, 10'b0001110001);
    known(8'h7C, 1, 0, 10'b0011110011); known(8'h3C, 1, 0, 10'b0011111001);
    known(8'hFB, 1, 0, 10'b1101101000); known(8'hFD, 1, 0, 10'b1011101000);
    known(8'hFE, 1, 0, 10'b0111101000); known(8'h5C, 1, 0, 10'b0011110101);
    known(8'hF1, 0, 0, 10'b1000110111); known(8'hEB, 0, 1, 10'b1101001000);
    known(8'h43, 0, 0, 10'b1100010101);
    known(8'h60, 0, 0, 10'b1001110011); known(8'h60, 0, 1, 10'b0110001100);
    known(8'h63, 0, 0, 10'b1100011100); known(8'h63, 0, 1, 10'b1100010011);
    for (int r = 0; r < 2; r++) begin
      foreach (seen[i]) seen[i] = 0;
      for (int d = 0; d < 256; d++) begin
        int ones;
        din = 8'(d); k = 0; rd_in = r[0]; #1;
        ones = $countones(code);
        checks++;
        if (ones < 4 || ones > 6) failures++;
        checks++;
        if ((r == 0 && ones < 5) || (r == 1 && ones > 5)) failures++;
        checks++;
        if (rd_out != ((ones == 5) ? rd_in : ~rd_in)) failures++;
        checks++;
        if (seen[code]) failures++;
        seen[code] = 1;
      end
    end
    // random stream: run length and running digital sum
    rd_in = 0; run = 0; last = -1; sum = -1;  // negative disparity = digital sum -1
    for (int n = 0; n < 5000; n++) begin
      din = 8'($urandom()); k = ($urandom_range(0, 9) == 0); if (k) din = 8'hBC;
      #1;
      for (int i = 0; i < 10; i++) begin
        if (code[i] == last) run++; else run = 1;
        last = code[i];
        sum += code[i] ? 1 : -1;
        checks++;
        if (run > 5 || sum > 3 || sum < -3) begin failures++; if (failures < 5) $display("FAIL stream run %0d sum %0d", run, sum); end
      end
      checks++;
      if (sum != (rd_out ? 1 : -1)) failures++;
      rd_in = rd_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
