// tb_hsiao_dec: every single-bit error of random code words is corrected
// and located; every double-bit error is flagged uncorrectable; a clean word
// passes untouched. Code words are built with the reference column table.
module tb_hsiao_dec;
  import cube_pkg::*;
  logic [7:0]  d, dout;
  logic [4:0]  c;
  logic [12:0] err;
  logic        ce, ue;
  int checks = 0, failures = 0;

  hsiao_dec dut (.data_i(d), .check_i(c), .data_o(dout), .err_o(err), .ce_o(ce), .ue_o(ue));

  // reference check bits written out per bit from the column table
  function automatic logic [4:0] ref_chk(logic [7:0] x);
    logic [4:0] r;
    r[0] = x[0]^x[1]^x[2]^x[4]^x[5]^x[7];
    r[1] = x[0]^x[1]^x[3]^x[4]^x[6];
    r[2] = x[0]^x[2]^x[3]^x[5]^x[6];
    r[3] = x[1]^x[2]^x[3]^x[7];
    r[4] = x[4]^x[5]^x[6]^x[7];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 40; t++) begin
      logic [7:0]  base;
      logic [12:0] cw, bad;
      base = 8'($urandom);
      cw = {ref_chk(base), base};
      {c, d} = cw; #1;
      checks++; if (dout !== base || ce || ue || err != 0) failures++;
      for (int i = 0; i < 13; i++) begin
        bad = cw ^ (13'(1) << i);
        {c, d} = bad; #1;
        checks++;
        if (dout !== base || !ce || ue || err !== (13'(1) << i)) failures++;
        for (int j = i + 1; j < 13; j++) begin
          bad = cw ^ (13'(1) << i) ^ (13'(1) << j);
          {c, d} = bad; #1;
          checks++;
          if (!ue || ce) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
