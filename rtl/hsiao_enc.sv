// hsiao_enc: Hsiao (13,8) SEC-DED encoder for one byte row of the stack.
//
// Combinational. Each of the five check bits is the XOR of the data bits whose
// parity-check column (cube_pkg::HSIAO_COL) has a one in that position; every
// data column has weight three, so each check bit is a small XOR tree. Byte-wide
// SEC-DED with five check devices follows the architecture; the particular
// choice of columns is this design's.
module hsiao_enc
  import cube_pkg::*;
(
  input  logic [N_DATA-1:0] data_i,   // one bit from each data die
  output logic [N_ECC-1:0]  check_o   // one bit for each ECC die
);
  always_comb check_o = hsiao_check(data_i);
endmodule
