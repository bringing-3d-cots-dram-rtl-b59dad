// tb_die_manager: identity map with the spare unpowered; lane data and
// enables reach the right die and back; a power-cycle request drops the die
// of the lane for T_OFF cycles; switching the spare into a lane moves that
// lane's traffic to die 13 and powers the replaced die off; dies_ready
// follows the busy flags of the dies in use only.
module tb_die_manager;
  import cube_pkg::*;
  localparam int TOFF = 10;
  logic clk = 0, rst_n = 0;
  lane_mask_t pc = '0, sp = '0, len = '1;
  logic cfg_sp = 0; logic [3:0] cfg_lane = 0;
  die_mask_t off = '0, busy = '0, pwr, den, drv = '0;
  logic sact, ready, rv; logic [3:0] slane;
  dq_t lw [N_LANES]; dq_t dw [N_DIES]; dq_t dr [N_DIES]; dq_t lr [N_LANES];
  int checks = 0, failures = 0;

  die_manager #(.T_OFF(TOFF)) dut (.clk, .rst_n, .pcycle_i(pc), .spare_i(sp),
    .cfg_spare_en_i(cfg_sp), .cfg_spare_lane_i(cfg_lane), .off_i(off), .phy_busy_i(busy),
    .power_o(pwr), .spare_act_o(sact), .spare_lane_o(slane), .dies_ready_o(ready),
    .lane_en_i(len), .die_en_o(den), .lane_wdata_i(lw), .die_wdata_o(dw),
    .die_rdata_i(dr), .lane_rdata_o(lr), .die_rvalid_i(drv), .rvalid_o(rv));
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_map(int spare_lane);
    for (int l = 0; l < N_LANES; l++) lw[l] = 16'(l * 16'h1111 + 16'h0100);
    for (int d = 0; d < N_DIES; d++) dr[d] = 16'(d * 16'h0101 + 16'h7000);
    #1;
    for (int l = 0; l < N_LANES; l++) begin
      int d;
      d = (l == spare_lane) ? 13 : l;
      chk(dw[d] == lw[l], "write route");
      chk(lr[l] == dr[d], "read route");
    end
  endtask

  initial begin
    for (int l = 0; l < N_LANES; l++) lw[l] = '0;
    for (int d = 0; d < N_DIES; d++) dr[d] = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(pwr == 14'h1FFF, "spare cold");
    check_map(-1);
    len = lane_mask_t'(1 << 4); #1;
    chk(den == die_mask_t'(1 << 4), "single-lane enable");
    len = '1;
    busy = die_mask_t'(1 << 13); #1;
    chk(ready, "spare busy ignored");
    busy = die_mask_t'(1 << 2); #1;
    chk(!ready, "busy die blocks ready");
    busy = '0;
    // power cycle lane 6
    @(negedge clk); pc = lane_mask_t'(1 << 6); @(negedge clk); pc = '0;
    for (int i = 0; i < TOFF; i++) begin
      chk(!pwr[6] && pwr[5], "die 6 off during cycle");
      @(negedge clk);
    end
    chk(pwr[6], "die 6 back on");
    // spare into lane 3
    @(negedge clk); sp = lane_mask_t'(1 << 3); @(negedge clk); sp = '0;
    chk(sact && slane == 3, "spare active");
    chk(pwr[13] && !pwr[3], "spare powered, die 3 off");
    check_map(3);
    len = lane_mask_t'(1 << 3); #1;
    chk(den == die_mask_t'(1 << 13), "lane 3 enable goes to spare");
    drv = die_mask_t'(1 << 3); #1;
    chk(!rv, "rvalid of retired die ignored");
    drv = die_mask_t'(1 << 13); #1;
    chk(rv, "rvalid of spare used");
    off = die_mask_t'(1 << 0); #1;
    chk(!pwr[0], "forced off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
