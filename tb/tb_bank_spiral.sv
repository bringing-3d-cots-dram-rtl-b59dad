// tb_bank_spiral: every command type, bank and die. Bank-addressed commands
// get bank (b + d) mod 8 on die d when enabled; everything else, and all
// commands when disabled, passes unchanged.
module tb_bank_spiral;
  import cube_pkg::*;
  logic en;
  ddr_cmd_t ci;
  ddr_cmd_t co [N_DIES];
  int checks = 0, failures = 0;
  bank_spiral dut (.en_i(en), .cmd_i(ci), .cmd_o(co));
  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c <= 10; c++)
        for (int b = 0; b < 8; b++) begin
          en = e[0];
          ci = '{cmd: cmd_e'(c), ba: 3'(b), addr: 16'($urandom)};
          #1;
          for (int d = 0; d < N_DIES; d++) begin
            logic [2:0] exp_ba;
            exp_ba = (e == 1 && (c == 2 || c == 3 || c == 4 || c == 5)) ? 3'((b + d) % 8) : 3'(b);
            checks++;
            if (co[d].ba !== exp_ba || co[d].cmd !== ci.cmd || co[d].addr !== ci.addr) failures++;
          end
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
