// ddr_phy: digital part of the low-latency PHY of one die.
//
// Each die has a PHY of its own so that it can be powered, initialised,
// conditioned or rebuilt independently. The PHY
//  * runs phy_init after power-on (full initialisation) and on c1_i (C1
//    software conditioning); while either runs, core commands are ignored and
//    the init sequencer drives the die;
//  * otherwise registers the core command onto the DDR3 pins (one cycle); a
//    command with en_i low is replaced by NOP (used to aim a write at one die);
//  * launches write data: the lane data entering at the same relative cycle
//    as the command is registered onto DQ, with DQ output enable for the BL
//    beats of an enabled WR;
//  * captures read data every cycle and flags the BL beats that belong to a
//    RD, CL cycles after the RD reached the pins (rvalid_o);
//  * handles self-refresh: CMD_SRE drives REF with CKE low, CKE stays low
//    until the next command other than DES.
// Timing: command at cmd_i in cycle t is on the pins in cycle t+1; a die
// that samples it at the next edge e returns read beat i for the capture
// edge e+CL+i, and rdata_o/rvalid_o show it one cycle after that edge.
// One PHY per die, power-up init and the C1 re-trigger follow the
// architecture. Equalisation, PLL, delay lines, DQS and training belong to
// the electrical PHY and are not here; DQ is split into in/out/enable.
module ddr_phy
  import cube_pkg::*;
#(
  parameter int unsigned CL       = 7,
  parameter int unsigned CWL      = 6,
  parameter int unsigned T_RST    = 60000,
  parameter int unsigned T_CKE    = 150000,
  parameter int unsigned T_ZQINIT = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              power_i,     // die supply switched on
  input  logic              c1_i,        // start software conditioning
  output logic              init_done_o,
  output logic              busy_o,      // init or conditioning running
  // core side
  input  ddr_cmd_t          cmd_i,
  input  logic              en_i,
  input  dq_t               wdata_i,
  output dq_t               rdata_o,
  output logic              rvalid_o,
  // die pins
  output logic              ddr_reset_n,
  output logic              ddr_cke,
  output logic              ddr_cs_n,
  output logic              ddr_ras_n,
  output logic              ddr_cas_n,
  output logic              ddr_we_n,
  output logic              ddr_odt,
  output logic [BA_W-1:0]   ddr_ba,
  output logic [ADDR_W-1:0] ddr_addr,
  output dq_t               ddr_dq_o,
  output logic              ddr_dq_oe,
  input  dq_t               ddr_dq_i
);
  ddr_cmd_t  icmd, cmd_n;
  logic      ireset_n, icke, ibusy, power_q, sref;
  logic [CWL+BL-2:0] wr_sr;
  logic [CL+BL-1:0] rd_sr;

  phy_init #(.CL(CL), .CWL(CWL), .T_RST(T_RST), .T_CKE(T_CKE), .T_ZQINIT(T_ZQINIT)) u_init (
    .clk, .rst_n,
    .start_i (power_i && !power_q),
    .c1_i    (c1_i && power_i),
    .cmd_o   (icmd),
    .reset_n_o(ireset_n),
    .cke_o   (icke),
    .busy_o  (ibusy),
    .done_o  (init_done_o)
  );

  assign busy_o = ibusy || !power_i;

  always_comb begin
    if (!power_i)           cmd_n = '{cmd: CMD_DES, ba: '0, addr: '0};
    else if (ibusy)         cmd_n = icmd;
    else if (!en_i)         cmd_n = CMD_IDLE;
    else                    cmd_n = cmd_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      power_q     <= 1'b0;
      sref        <= 1'b0;
      {ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} <= 4'b1111;
      ddr_reset_n <= 1'b0;
      ddr_cke     <= 1'b0;
      ddr_odt     <= 1'b0;
      ddr_ba      <= '0;
      ddr_addr    <= '0;
      ddr_dq_o    <= '0;
      ddr_dq_oe   <= 1'b0;
      wr_sr       <= '0;
      rd_sr       <= '0;
      rdata_o     <= '0;
      rvalid_o    <= 1'b0;
    end else begin
      power_q <= power_i;
      {ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} <= cmd_to_pins(cmd_n.cmd);
      ddr_ba      <= cmd_n.ba;
      ddr_addr    <= (cmd_n.cmd == CMD_PREA) ? (cmd_n.addr | ADDR_W'(1 << 10)) :
                     (cmd_n.cmd == CMD_PRE)  ? (cmd_n.addr & ~ADDR_W'(1 << 10)) : cmd_n.addr;
      ddr_reset_n <= power_i && ireset_n;
      if (cmd_n.cmd == CMD_SRE)               sref <= 1'b1;
      else if (cmd_n.cmd != CMD_DES || ibusy) sref <= 1'b0;
      ddr_cke     <= power_i && icke && !(cmd_n.cmd == CMD_SRE) &&
                     !(sref && cmd_n.cmd == CMD_DES);
      // write: beats leave CWL cycles after the WR reached the pins
      wr_sr    <= {wr_sr[CWL+BL-3:0], (cmd_n.cmd == CMD_WR)};
      ddr_dq_o <= wdata_i;
      ddr_dq_oe <= |wr_sr[CWL-1 +: BL];
      ddr_odt  <= |wr_sr[CWL-1 +: BL];
      // read: capture and flag the BL beats
      rd_sr    <= {rd_sr[CL+BL-2:0], (cmd_n.cmd == CMD_RD)};
      rdata_o  <= ddr_dq_i;
      rvalid_o <= |rd_sr[CL +: BL];
    end
  end
endmodule
