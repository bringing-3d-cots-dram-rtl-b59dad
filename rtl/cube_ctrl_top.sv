// cube_ctrl_top: radiation-hardened-by-design controller under a stack of
// fourteen COTS x16 DDR3 dies (8 data, 5 ECC, 1 cold spare).
//
// To the host the cube looks like one x128 DDR3 module: host commands pass
// through (host port -> MUX -> bank spiraling -> 14 die PHYs) and write data
// is SEC-DED encoded on the way in, read data corrected on the way out. The
// controller adds no scheduling of its own in Normal mode; it only steals
// time the host has promised not to use (idle detector) to run maintenance:
// power-up initialisation and zeroization, BIST, scrubbing, die rebuild,
// software conditioning, power cycling and cold-spare replacement. An SPI port
// carries configuration and error statistics.
// Latency (fabric cycles, one beat per cycle): a host command reaches the die
// pins 3 cycles after the host pins (host port, MUX, PHY registers); write
// data follows at the same offset; read data is back at the host CL+5 cycles
// after the RD (capture, EDAC). Host write beats are expected CWL cycles
// after the WR, one per cycle.
// The block structure follows the controller architecture; the one-beat-per-
// cycle abstraction and every cycle count are this design's.
module cube_ctrl_top
  import cube_pkg::*;
#(
  parameter int unsigned CL         = 7,
  parameter int unsigned CWL        = 6,
  parameter int unsigned T_RCD      = 6,
  parameter int unsigned T_RP       = 6,
  parameter int unsigned T_RFC      = 105,
  parameter int unsigned T_RST      = 60000,
  parameter int unsigned T_CKE      = 150000,
  parameter int unsigned T_ZQINIT   = 512,
  parameter int unsigned T_OFF      = 64,
  parameter int unsigned WALK_ROW_W = 16,
  parameter int unsigned WALK_COL_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              zeroize_i,      // strap: zeroize the array at power-up
  // host DDR3 side
  input  logic              host_cke,
  input  logic              host_cs_n,
  input  logic              host_ras_n,
  input  logic              host_cas_n,
  input  logic              host_we_n,
  input  logic [BA_W-1:0]   host_ba,
  input  logic [ADDR_W-1:0] host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata,
  output logic              host_rvalid,
  input  logic              host_idle,      // Idle GPIO
  // SPI housekeeping port
  input  logic              spi_sclk,
  input  logic              spi_cs_n,
  input  logic              spi_mosi,
  output logic              spi_miso,
  // sensors
  input  logic [15:0]       temp_i,         // stack temperature, deg C
  input  logic              adc_sample_i,
  input  logic [11:0]       adc_i [N_DIES], // averaged die currents
  // die power switches
  output die_mask_t         die_power_o,
  // die DDR3 pins
  output logic              ddr_reset_n [N_DIES],
  output logic              ddr_cke     [N_DIES],
  output logic              ddr_cs_n    [N_DIES],
  output logic              ddr_ras_n   [N_DIES],
  output logic              ddr_cas_n   [N_DIES],
  output logic              ddr_we_n    [N_DIES],
  output logic              ddr_odt     [N_DIES],
  output logic [BA_W-1:0]   ddr_ba      [N_DIES],
  output logic [ADDR_W-1:0] ddr_addr    [N_DIES],
  output dq_t               ddr_dq_o    [N_DIES],
  output logic              ddr_dq_oe   [N_DIES],
  input  dq_t               ddr_dq_i    [N_DIES],
  // status
  output mode_e             mode_o,
  output logic              pwrup_done_o,
  output die_mask_t         phy_init_done_o,
  output lane_mask_t        sefi_o,
  output logic [15:0]       collisions_o
);
  // ---------------- configuration (SPI) ----------------
  logic        scrub_en, spiral_en, cs_mode, idle_req, bist_start, rebuild_start;
  logic        c1_start, log_clear_cfg, spare_en, autorepair;
  logic [2:0]  host_width;
  bist_pat_e   bist_pat;
  logic [3:0]  lane_sel, max_rep, persist;
  logic [15:0] scrub_int, refi, sefi_thresh;
  logic [31:0] sefi_window;
  logic [11:0] ext, op_len, cur_margin;
  die_mask_t   die_off;

  // ---------------- host side ----------------
  ddr_cmd_t host_cmd, mux_cmd, maint_cmd;
  word_t    host_wd, maint_wd, mux_wd;
  word_t    rdata;
  logic     rvalid, ce, ue;
  dq_t      rerr [N_LANES];

  host_port u_host (
    .clk, .rst_n, .width_i(host_width),
    .cke_i(host_cke), .cs_n_i(host_cs_n), .ras_n_i(host_ras_n), .cas_n_i(host_cas_n),
    .we_n_i(host_we_n), .ba_i(host_ba), .addr_i(host_addr),
    .wdata_i(host_wdata), .rdata_o(host_rdata), .rvalid_o(host_rvalid),
    .cmd_o(host_cmd), .wdata_o(host_wd), .rdata_i(rdata), .rvalid_i(rvalid)
  );

  logic        grant, host_idle_win;
  logic [31:0] windows;
  idle_detector u_idle (
    .clk, .rst_n, .host_cmd_i(host_cmd.cmd), .idle_pin_i(host_idle), .spi_idle_i(idle_req),
    .cs_mode_i(cs_mode), .busy_ref_i(12'(T_RFC)), .busy_zq_i(12'(T_ZQINIT)),
    .ext_i(ext), .op_len_i(op_len), .grant_o(grant), .host_idle_o(host_idle_win),
    .windows_o(windows)
  );

  // ---------------- control logic ----------------
  logic        maint_req, dies_ready;
  lane_mask_t  lane_en, sefi, c1_l, pcycle_l, spare_l, mclear_l, anomaly_l, bist_lanes;
  logic        bist_busy, bist_fail, rebuild_busy, hot;
  logic [15:0] rebuild_cnt, scrub_cnt, scrub_fix, stuck_cnt, ref_cnt, repair_cnt;

  assign hot = $signed(temp_i) >= 16'sd85;

  maint_ctrl #(.CL(CL), .CWL(CWL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC),
               .WALK_ROW_W(WALK_ROW_W), .WALK_COL_W(WALK_COL_W)) u_maint (
    .clk, .rst_n,
    .zeroize_i, .scrub_en_i(scrub_en), .scrub_int_i(scrub_int), .max_rep_i(max_rep),
    .refi_i(refi), .hot_i(hot), .autorepair_i(autorepair),
    .bist_start_i(bist_start), .bist_pat_i(bist_pat), .rebuild_start_i(rebuild_start),
    .lane_sel_i(lane_sel), .c1_start_i(c1_start),
    .sefi_i(sefi), .anomaly_i(anomaly_l), .grant_i(grant), .host_idle_i(host_idle_win),
    .host_ref_i(host_cmd.cmd == CMD_REF), .dies_ready_i(dies_ready),
    .maint_req_o(maint_req), .cmd_o(maint_cmd), .wdata_o(maint_wd), .lane_en_o(lane_en),
    .rdata_i(rdata), .rvalid_i(rvalid), .ce_i(ce), .ue_i(ue), .rerr_i(rerr),
    .c1_o(c1_l), .pcycle_o(pcycle_l), .spare_o(spare_l), .log_clear_o(mclear_l),
    .pwrup_done_o, .bist_busy_o(bist_busy), .bist_fail_o(bist_fail),
    .bist_lane_fail_o(bist_lanes), .rebuild_busy_o(rebuild_busy),
    .rebuild_cnt_o(rebuild_cnt), .scrub_cnt_o(scrub_cnt), .scrub_fix_o(scrub_fix),
    .stuck_cnt_o(stuck_cnt), .ref_cnt_o(ref_cnt), .repair_cnt_o(repair_cnt)
  );

  // ---------------- MUX ----------------
  cmd_mux #(.CWL(CWL)) u_mux (
    .clk, .rst_n, .host_cmd_i(host_cmd), .host_wdata_i(host_wd),
    .maint_req_i(maint_req), .maint_cmd_i(maint_cmd), .maint_wdata_i(maint_wd),
    .cmd_o(mux_cmd), .wdata_o(mux_wd), .mode_o(mode_o), .collisions_o
  );

  // lane enables travel with the command through the MUX register
  lane_mask_t lane_en_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lane_en_q <= '1;
    else        lane_en_q <= maint_req ? lane_en : '1;

  // ---------------- EDAC + LOG ----------------
  dq_t wlane [N_LANES];
  dq_t rlane [N_LANES];
  logic lane_rvalid;

  edac u_edac (
    .clk, .rst_n, .wdata_i(mux_wd), .wlane_o(wlane),
    .rvalid_i(lane_rvalid), .rlane_i(rlane),
    .rvalid_o(rvalid), .rdata_o(rdata), .rerr_o(rerr), .ce_o(ce), .ue_o(ue)
  );

  logic [31:0] lane_total [N_LANES];
  logic [31:0] ce_cnt, ue_cnt;
  error_log u_log (
    .clk, .rst_n, .valid_i(rvalid), .err_i(rerr), .ce_i(ce), .ue_i(ue),
    .thresh_i(sefi_thresh), .window_i(sefi_window),
    .clear_i(mclear_l | {N_LANES{log_clear_cfg}}),
    .total_o(lane_total), .sefi_o(sefi), .ce_cnt_o(ce_cnt), .ue_cnt_o(ue_cnt)
  );
  assign sefi_o = sefi;

  // ---------------- die management ----------------
  die_mask_t die_en, phy_busy, die_rvalid, anomaly_d, c1_d, aclear_d;
  dq_t       die_wd [N_DIES];
  dq_t       die_rd [N_DIES];
  logic      spare_act;
  logic [3:0] spare_lane;

  die_manager #(.T_OFF(T_OFF)) u_dies (
    .clk, .rst_n, .pcycle_i(pcycle_l), .spare_i(spare_l),
    .cfg_spare_en_i(spare_en), .cfg_spare_lane_i(lane_sel), .off_i(die_off),
    .phy_busy_i(phy_busy), .power_o(die_power_o), .spare_act_o(spare_act),
    .spare_lane_o(spare_lane), .dies_ready_o(dies_ready),
    .lane_en_i(lane_en_q), .die_en_o(die_en),
    .lane_wdata_i(wlane), .die_wdata_o(die_wd),
    .die_rdata_i(die_rd), .lane_rdata_o(rlane),
    .die_rvalid_i(die_rvalid), .rvalid_o(lane_rvalid)
  );

  // lane <-> die translation of per-lane events
  always_comb begin
    c1_d     = '0;
    aclear_d = '0;
    for (int l = 0; l < N_LANES; l++) begin
      logic [3:0] d;
      d = (spare_act && spare_lane == 4'(l)) ? 4'(SPARE_DIE) : 4'(l);
      anomaly_l[l] = anomaly_d[d];
      c1_d[d]      = c1_l[l];
      aclear_d[d]  = mclear_l[l];
    end
  end

  current_monitor u_cur (
    .clk, .rst_n, .sample_i(adc_sample_i), .adc_i, .active_i(die_power_o),
    .margin_i(cur_margin), .persist_i(persist), .clear_i(aclear_d), .anomaly_o(anomaly_d)
  );

  // ---------------- bank spiraling + 14 PHYs ----------------
  ddr_cmd_t die_cmd [N_DIES];
  bank_spiral u_spiral (.en_i(spiral_en), .cmd_i(mux_cmd), .cmd_o(die_cmd));

  for (genvar d = 0; d < N_DIES; d++) begin : g_phy
    ddr_phy #(.CL(CL), .CWL(CWL), .T_RST(T_RST), .T_CKE(T_CKE), .T_ZQINIT(T_ZQINIT)) u_phy (
      .clk, .rst_n,
      .power_i(die_power_o[d]), .c1_i(c1_d[d]), .init_done_o(phy_init_done_o[d]), .busy_o(phy_busy[d]),
      .cmd_i(die_cmd[d]), .en_i(die_en[d]), .wdata_i(die_wd[d]),
      .rdata_o(die_rd[d]), .rvalid_o(die_rvalid[d]),
      .ddr_reset_n(ddr_reset_n[d]), .ddr_cke(ddr_cke[d]), .ddr_cs_n(ddr_cs_n[d]),
      .ddr_ras_n(ddr_ras_n[d]), .ddr_cas_n(ddr_cas_n[d]), .ddr_we_n(ddr_we_n[d]),
      .ddr_odt(ddr_odt[d]), .ddr_ba(ddr_ba[d]), .ddr_addr(ddr_addr[d]),
      .ddr_dq_o(ddr_dq_o[d]), .ddr_dq_oe(ddr_dq_oe[d]), .ddr_dq_i(ddr_dq_i[d])
    );
  end

  // ---------------- SPI port ----------------
  logic [15:0] lane_err16 [N_LANES];
  always_comb for (int l = 0; l < N_LANES; l++) lane_err16[l] = lane_total[l][15:0];

  logic [15:0] status;
  assign status = {7'd0, spare_act, hot, rebuild_busy, bist_fail, bist_busy,
                   dies_ready, pwrup_done_o, mode_o == MODE_MAINT, grant};

  spi_port u_spi (
    .clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .scrub_en_o(scrub_en), .spiral_en_o(spiral_en), .cs_mode_o(cs_mode),
    .idle_req_o(idle_req), .bist_start_o(bist_start), .rebuild_start_o(rebuild_start),
    .c1_start_o(c1_start), .log_clear_o(log_clear_cfg), .spare_en_o(spare_en),
    .autorepair_o(autorepair), .host_width_o(host_width), .bist_pat_o(bist_pat),
    .lane_o(lane_sel), .scrub_int_o(scrub_int), .refi_o(refi),
    .sefi_thresh_o(sefi_thresh), .sefi_window_o(sefi_window), .ext_o(ext),
    .op_len_o(op_len), .cur_margin_o(cur_margin), .die_off_o(die_off),
    .max_rep_o(max_rep), .persist_o(persist),
    .status_i(status), .temp_i(temp_i), .sefi_i(sefi), .anomaly_i(anomaly_d),
    .ce_cnt_i(ce_cnt[15:0]), .ue_cnt_i(ue_cnt[15:0]), .stuck_i(stuck_cnt),
    .scrub_cnt_i(scrub_cnt), .rebuild_cnt_i(rebuild_cnt), .ref_cnt_i(ref_cnt),
    .bist_lanes_i(bist_lanes), .repair_cnt_i(repair_cnt),
    .windows_i(windows[15:0]), .scrub_fix_i(scrub_fix), .ce_hi_i(ce_cnt[31:16]), .ue_hi_i(ue_cnt[31:16]), .lane_err_i(lane_err16)
  );
endmodule
