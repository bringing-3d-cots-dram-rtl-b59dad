// hsiao_dec: Hsiao (13,8) SEC-DED decoder for one byte row of the stack.
//
// Combinational. The syndrome is the recomputed check XOR the stored check.
// Zero means no error. A syndrome equal to a data column flips that data bit;
// a unit syndrome marks a flipped check bit. Any other syndrome (even weight,
// or one of the unused weight-3 columns, or weight 5) is uncorrectable.
// The corrected byte is re-encoded and XORed with the raw code word to give
// the mask of failing lanes (one bit per die); the mask is zero when the error
// is uncorrectable because its location is then unknown.
module hsiao_dec
  import cube_pkg::*;
(
  input  logic [N_DATA-1:0]  data_i,
  input  logic [N_ECC-1:0]   check_i,
  output logic [N_DATA-1:0]  data_o,    // corrected data
  output logic [N_LANES-1:0] err_o,     // failing lanes: {check[4:0], data[7:0]}
  output logic               ce_o,      // a single error was corrected
  output logic               ue_o       // uncorrectable (double) error
);
  logic [N_ECC-1:0] syn;
  logic [N_DATA-1:0] flip;
  logic chk_err;

  always_comb begin
    syn  = hsiao_check(data_i) ^ check_i;
    flip = '0;
    for (int k = 0; k < N_DATA; k++)
      flip[k] = (syn == HSIAO_COL[k]);
    chk_err = (syn != 0) && ((syn & (syn - 1)) == 0);
    data_o  = data_i ^ flip;
    ce_o    = (flip != '0) || chk_err;
    ue_o    = (syn != '0) && !ce_o;
    err_o   = ue_o ? '0 : {hsiao_check(data_o) ^ check_i, data_o ^ data_i};
  end
endmodule
