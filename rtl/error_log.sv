// error_log: error statistics of the EDAC read path and SEFI suspicion per lane.
//
// For every valid corrected read beat the decoder delivers, per logical lane,
// the mask of DQ bits it had to flip. This block keeps, per lane, a saturating
// total bit-error count (readable over SPI) and a count for the current
// observation window. A lane whose window count exceeds the programmable
// threshold gets a sticky SEFI flag: a die that produces many errors in a
// short time is assumed hit by a functional interrupt and is handed to the
// power-cycle/rebuild machinery. Beats with correctable and uncorrectable
// errors are counted too.
// Counting per-lane bit errors and the programmable threshold follow the
// architecture; the window mechanism and counter widths are this design's.
// Timing: counts update the cycle after the beat; window_i = 0 disables
// the window reset (counts then accumulate until clear).
module error_log
  import cube_pkg::*;
#(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned WIN_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_i,
  input  dq_t                  err_i [N_LANES],
  input  logic                 ce_i,
  input  logic                 ue_i,
  input  logic [WIN_W-1:0]     thresh_i,   // SEFI threshold (bit errors per window)
  input  logic [31:0]          window_i,   // window length in cycles, 0 = none
  input  lane_mask_t           clear_i,    // clear a lane's counts and flag
  output logic [CNT_W-1:0]     total_o [N_LANES],
  output lane_mask_t           sefi_o,
  output logic [CNT_W-1:0]     ce_cnt_o,
  output logic [CNT_W-1:0]     ue_cnt_o
);
  logic [WIN_W-1:0] win_cnt [N_LANES];
  logic [31:0]      tick;
  logic             win_end;

  assign win_end = (window_i != 0) && (tick >= window_i - 1);

  function automatic logic [4:0] popcnt(dq_t v);
    logic [4:0] n;
    n = '0;
    for (int i = 0; i < DQ_W; i++) n += 5'(v[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= '0;
      sefi_o   <= '0;
      ce_cnt_o <= '0;
      ue_cnt_o <= '0;
      for (int l = 0; l < N_LANES; l++) begin
        total_o[l] <= '0;
        win_cnt[l] <= '0;
      end
    end else begin
      tick <= win_end ? '0 : tick + 1;
      if (valid_i && ce_i && ce_cnt_o != '1) ce_cnt_o <= ce_cnt_o + 1;
      if (valid_i && ue_i && ue_cnt_o != '1) ue_cnt_o <= ue_cnt_o + 1;
      for (int l = 0; l < N_LANES; l++) begin
        logic [CNT_W:0]   t;
        logic [WIN_W:0]   w;
        t = {1'b0, total_o[l]} + ((valid_i) ? (CNT_W+1)'(popcnt(err_i[l])) : '0);
        w = {1'b0, win_cnt[l]} + ((valid_i) ? (WIN_W+1)'(popcnt(err_i[l])) : '0);
        if (clear_i[l]) begin
          total_o[l] <= '0;
          win_cnt[l] <= '0;
          sefi_o[l]  <= 1'b0;
        end else begin
          total_o[l] <= t[CNT_W] ? '1 : t[CNT_W-1:0];
          win_cnt[l] <= win_end ? '0 : (w[WIN_W] ? '1 : w[WIN_W-1:0]);
          if (w > {1'b0, thresh_i}) sefi_o[l] <= 1'b1;
        end
      end
    end
  end
endmodule
