// die_manager: which physical die serves which logical lane, and die power.
//
// The EDAC works on 13 logical lanes (8 data, 5 ECC). Normally lane l is
// physical die l and die 13 is a cold spare, unpowered. When the spare is
// switched in for lane s (spare_i pulse, or the CSR spare fields), die 13
// takes over lane s: it is powered, its PHY initialises, write data and
// commands for lane s go to it and its read data feeds lane s; the replaced
// die is powered off. A power-cycle request (pcycle_i pulse) switches the
// die of a lane off for T_OFF cycles; its PHY re-initialises when power
// returns. Dies can also be forced off over SPI (off_i). A die that is off
// or initialising does not receive commands; the EDAC corrects its lane.
// dies_ready_o is high when every die in use has finished initialisation.
// Timing: the map and power are registered; the lane/die data paths are
// combinational.
// The cold spare, per-die ON/OFF and power cycling follow the architecture;
// the single-spare mapping and the power-off time are this design's.
module die_manager
  import cube_pkg::*;
#(
  parameter int unsigned T_OFF = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  lane_mask_t  pcycle_i,       // power-cycle the die of these lanes
  input  lane_mask_t  spare_i,        // switch the spare into this lane
  input  logic        cfg_spare_en_i, // CSR: spare in use
  input  logic [3:0]  cfg_spare_lane_i,
  input  die_mask_t   off_i,          // CSR: force dies off
  input  die_mask_t   phy_busy_i,     // PHY initialising or off
  output die_mask_t   power_o,        // FET enables
  output logic        spare_act_o,
  output logic [3:0]  spare_lane_o,
  output logic        dies_ready_o,
  // data / command routing
  input  lane_mask_t  lane_en_i,
  output die_mask_t   die_en_o,
  input  dq_t         lane_wdata_i [N_LANES],
  output dq_t         die_wdata_o  [N_DIES],
  input  dq_t         die_rdata_i  [N_DIES],
  output dq_t         lane_rdata_o [N_LANES],
  input  die_mask_t   die_rvalid_i,
  output logic        rvalid_o
);
  logic [7:0] off_tmr [N_LANES];
  die_mask_t  in_use;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spare_act_o  <= 1'b0;
      spare_lane_o <= '0;
      for (int l = 0; l < N_LANES; l++) off_tmr[l] <= '0;
    end else begin
      if (spare_i != '0) begin
        spare_act_o <= 1'b1;
        for (int l = 0; l < N_LANES; l++) if (spare_i[l]) spare_lane_o <= 4'(l);
      end else if (cfg_spare_en_i && !spare_act_o) begin
        spare_act_o  <= 1'b1;
        spare_lane_o <= cfg_spare_lane_i;
      end
      for (int l = 0; l < N_LANES; l++)
        if (pcycle_i[l])          off_tmr[l] <= 8'(T_OFF);
        else if (off_tmr[l] != 0) off_tmr[l] <= off_tmr[l] - 1;
    end
  end

  // physical die serving lane l
  function automatic logic [3:0] die_of(int l);
    return (spare_act_o && spare_lane_o == 4'(l)) ? 4'(SPARE_DIE) : 4'(l);
  endfunction

  always_comb begin
    in_use = '0;
    for (int l = 0; l < N_LANES; l++) in_use[die_of(l)] = 1'b1;
    for (int d = 0; d < N_DIES; d++) begin
      power_o[d]     = in_use[d] && !off_i[d];
      die_en_o[d]    = 1'b0;
      die_wdata_o[d] = '0;
    end
    for (int l = 0; l < N_LANES; l++) begin
      if (off_tmr[l] != 0) power_o[die_of(l)] = 1'b0;
      die_en_o[die_of(l)]    = lane_en_i[l];
      die_wdata_o[die_of(l)] = lane_wdata_i[l];
      lane_rdata_o[l]        = die_rdata_i[die_of(l)];
    end
    dies_ready_o = ((phy_busy_i & in_use) == '0);
    rvalid_o     = |(die_rvalid_i & in_use);
  end
endmodule
