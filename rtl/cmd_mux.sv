// cmd_mux: the MUX between host pass-through and controller maintenance.
//
// In Normal mode the host's commands and write data pass straight to the
// stack; in Maintenance mode the control logic drives both. The command
// select follows maint_req_i at once (the command output is registered, one
// cycle). Write data trails its WR command by the write latency, so the
// write-data select is the command select delayed by CWL cycles: a host write
// issued just before a switch still gets its own data, and vice versa.
// mode_o reports the mode (the 3-bit values of the controller simulation:
// 001 Normal, 010 Maintenance). A host command other than NOP/DES that
// arrives in Maintenance mode is dropped and counted in collisions_o; with a
// correctly timed host this never happens.
// The MUX and its two modes follow the architecture; the delayed data select
// and the collision counter are this design's.
module cmd_mux
  import cube_pkg::*;
#(
  parameter int unsigned CWL = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ddr_cmd_t  host_cmd_i,
  input  word_t     host_wdata_i,
  input  logic      maint_req_i,
  input  ddr_cmd_t  maint_cmd_i,
  input  word_t     maint_wdata_i,
  output ddr_cmd_t  cmd_o,
  output word_t     wdata_o,
  output mode_e     mode_o,
  output logic [15:0] collisions_o
);
  logic [CWL:0] sel_dly;   // sel_dly[0] = select of the command now entering

  always_comb sel_dly[0] = maint_req_i;
  always_comb wdata_o = sel_dly[CWL] ? maint_wdata_i : host_wdata_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_o        <= CMD_IDLE;
      mode_o       <= MODE_NORMAL;
      sel_dly[CWL:1] <= '0;
      collisions_o <= '0;
    end else begin
      sel_dly[CWL:1] <= sel_dly[CWL-1:0];
      cmd_o  <= maint_req_i ? maint_cmd_i : host_cmd_i;
      mode_o <= maint_req_i ? MODE_MAINT : MODE_NORMAL;
      if (maint_req_i && !(host_cmd_i.cmd inside {CMD_NOP, CMD_DES}) && collisions_o != '1)
        collisions_o <= collisions_o + 1;
    end
  end
endmodule
