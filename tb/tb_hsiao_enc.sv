// tb_hsiao_enc: exhaustive check of the (13,8) encoder. Two hand-computed
// code words are compared directly; for all 256 x 256 pairs of data bytes the
// Hamming distance between the code words must be at least 4 (the SEC-DED
// property), and every code word must have even-or-odd weight consistent
// with odd-weight columns (weight of check = parity-consistent).
module tb_hsiao_enc;
  import cube_pkg::*;
  logic [7:0] d;
  logic [4:0] c;
  int checks = 0, failures = 0;
  logic [12:0] cw [256];

  hsiao_enc dut (.data_i(d), .check_o(c));

  initial begin
    d = 8'h01; #1; checks++; if (c !== 5'b00111) failures++;
    d = 8'hFF; #1; checks++; if (c !== 5'b00110) failures++;
    d = 8'h00; #1; checks++; if (c !== 5'b00000) failures++;
    d = 8'h80; #1; checks++; if (c !== 5'b11001) failures++;
    for (int i = 0; i < 256; i++) begin
      d = 8'(i); #1; cw[i] = {c, d};
    end
    for (int i = 0; i < 256; i++)
      for (int j = i + 1; j < 256; j++) begin
        checks++;
        if ($countones(cw[i] ^ cw[j]) < 4) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
