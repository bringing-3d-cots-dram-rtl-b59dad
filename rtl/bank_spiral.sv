// bank_spiral: per-die bank address mixing ("bank spiraling").
//
// A particle that crosses the whole stack tends to hit the same bank of every
// die. To keep one code word from depending on the same physical bank of all
// dies, the bank of every bank-addressed command (ACT, RD, WR, PRE) sent to
// physical die d is rotated by d: bank' = (bank + d) mod 8. Reads and writes of
// a logical address therefore land in bank (b + d) on die d, consistently, so
// the mapping is invisible to the host. Commands without a bank (REF, PREA,
// ZQCL, MRS, NOP) pass unchanged. Spiraling can be turned off.
// That the bank is mixed between dies follows the architecture; the rotation
// by the die index is this design's choice. Combinational.
module bank_spiral
  import cube_pkg::*;
(
  input  logic      en_i,
  input  ddr_cmd_t  cmd_i,
  output ddr_cmd_t  cmd_o [N_DIES]
);
  always_comb begin
    for (int d = 0; d < N_DIES; d++) begin
      cmd_o[d] = cmd_i;
      if (en_i && (cmd_i.cmd inside {CMD_ACT, CMD_RD, CMD_WR, CMD_PRE}))
        cmd_o[d].ba = cmd_i.ba + BA_W'(d);
    end
  end
endmodule
