// edac: SEC-DED protection of the 128-bit word across the 13 data/ECC lanes.
//
// Write side: the 128-bit word is cut into sixteen bytes; byte r is spread
// over the data lanes (bit k of byte r -> DQ r of data lane k) and its five
// Hsiao check bits go to DQ r of the five ECC lanes. Sixteen encoders run in
// parallel; the lanes are registered (one cycle).
// Read side: sixteen decoders correct each row; the corrected word, the
// per-lane failing-bit masks (corrected XOR raw, after re-encoding) and the
// CE/UE flags are registered (one cycle). A whole failed die is therefore
// corrected as long as every other die of each row is clean.
// The byte-row interleave and 16 encoder/decoder pairs follow the
// architecture; the single register on each side is this design's choice.
module edac
  import cube_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // write path
  input  word_t               wdata_i,
  output dq_t                 wlane_o [N_LANES],
  // read path
  input  logic                rvalid_i,
  input  dq_t                 rlane_i [N_LANES],
  output logic                rvalid_o,
  output word_t               rdata_o,
  output dq_t                 rerr_o  [N_LANES],  // failing DQ bits per lane
  output logic                ce_o,               // at least one row corrected
  output logic                ue_o                // at least one row uncorrectable
);
  dq_t   wl_d [N_LANES];
  dq_t   re_d [N_LANES];
  word_t rd_d;
  logic [ROWS-1:0] row_ce, row_ue;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [N_DATA-1:0]  wbyte, rbyte, cbyte;
    logic [N_ECC-1:0]   wchk, rchk;
    logic [N_LANES-1:0] err;

    assign wbyte = wdata_i[r*N_DATA +: N_DATA];
    hsiao_enc u_enc (.data_i(wbyte), .check_o(wchk));

    for (genvar k = 0; k < N_DATA; k++) begin : g_d
      assign rbyte[k]    = rlane_i[k][r];
      assign wl_d[k][r]  = wbyte[k];
      assign re_d[k][r]  = err[k];
    end
    for (genvar j = 0; j < N_ECC; j++) begin : g_c
      assign rchk[j]             = rlane_i[N_DATA+j][r];
      assign wl_d[N_DATA+j][r]   = wchk[j];
      assign re_d[N_DATA+j][r]   = err[N_DATA+j];
    end

    hsiao_dec u_dec (.data_i(rbyte), .check_i(rchk), .data_o(cbyte),
                     .err_o(err), .ce_o(row_ce[r]), .ue_o(row_ue[r]));
    assign rd_d[r*N_DATA +: N_DATA] = cbyte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_o <= 1'b0;
      rdata_o  <= '0;
      ce_o     <= 1'b0;
      ue_o     <= 1'b0;
      for (int i = 0; i < N_LANES; i++) begin
        wlane_o[i] <= '0;
        rerr_o[i]  <= '0;
      end
    end else begin
      rvalid_o <= rvalid_i;
      rdata_o  <= rd_d;
      ce_o     <= rvalid_i && (row_ce != '0);
      ue_o     <= rvalid_i && (row_ue != '0);
      for (int i = 0; i < N_LANES; i++) begin
        wlane_o[i] <= wl_d[i];
        rerr_o[i]  <= rvalid_i ? re_d[i] : '0;
      end
    end
  end
endmodule
