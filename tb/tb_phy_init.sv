// tb_phy_init: full initialisation with short timings: RESET# and CKE
// release times, the order MR2, MR3, MR1, MR0, ZQCL with their bank
// addresses and spacing, the MR0/MR2 contents for CL/CWL, done at the end;
// then C1 conditioning: MRS x4 + ZQCL again, with RESET#/CKE kept high.
module tb_phy_init;
  import cube_pkg::*;
  localparam int TR = 10, TC = 20, TX = 5, TMRD = 4, TMOD = 12, TZQ = 30, CL = 7, CWL = 6;
  logic clk = 0, rst_n = 0, start = 0, c1 = 0;
  ddr_cmd_t cmd;
  logic rn, cke, busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_cmd [$];
  ddr_cmd_t cmds [$];
  int t_rn = -1, t_cke = -1, t_done = -1;
  logic rn_low_during_c1 = 0;

  phy_init #(.CL(CL), .CWL(CWL), .T_RST(TR), .T_CKE(TC), .T_XPR(TX), .T_MRD(TMRD),
             .T_MOD(TMOD), .T_ZQINIT(TZQ)) dut (
    .clk, .rst_n, .start_i(start), .c1_i(c1), .cmd_o(cmd), .reset_n_o(rn), .cke_o(cke),
    .busy_o(busy), .done_o(done));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin   // outputs are meaningful once reset has been applied
      if (cmd.cmd != CMD_NOP) begin t_cmd.push_back(cyc); cmds.push_back(cmd); end
      if (rn && t_rn < 0) t_rn = cyc;
      if (cke && t_cke < 0) t_cke = cyc;
      if (done && t_done < 0) t_done = cyc;
    end
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
    wait (done); @(posedge clk); #1;
    checks++; if (t_rn - t0 != TR + 1) failures++;
    checks++; if (t_cke - t_rn != TC) failures++;
    checks++; if (cmds.size() != 5) failures++;
    if (cmds.size() == 5) begin
      checks++; if (cmds[0].cmd != CMD_MRS || cmds[0].ba != 2 || cmds[0].addr != 16'((CWL-5) << 3)) failures++;
      checks++; if (cmds[1].cmd != CMD_MRS || cmds[1].ba != 3) failures++;
      checks++; if (cmds[2].cmd != CMD_MRS || cmds[2].ba != 1) failures++;
      checks++; if (cmds[3].cmd != CMD_MRS || cmds[3].ba != 0 || cmds[3].addr != 16'h0930) failures++;
      checks++; if (cmds[4].cmd != CMD_ZQCL || !cmds[4].addr[10]) failures++;
      checks++; if (t_cmd[0] - t_cke != TX) failures++;
      checks++; if (t_cmd[1] - t_cmd[0] != TMRD || t_cmd[3] - t_cmd[2] != TMRD) failures++;
      checks++; if (t_cmd[4] - t_cmd[3] < TMOD) failures++;
      checks++; if (t_done - t_cmd[4] < TZQ) failures++;
    end
    // C1
    t_cmd.delete(); cmds.delete();
    @(negedge clk); c1 = 1; @(negedge clk); c1 = 0;
    fork
      begin wait (!busy); end
      begin repeat (200) begin @(posedge clk); if (!rn || !cke) rn_low_during_c1 = 1; end end
    join_any
    disable fork;
    wait (!busy); @(posedge clk); #1;
    checks++; if (cmds.size() != 5) failures++;
    if (cmds.size() == 5) begin
      checks++; if (cmds[3].addr[8] != 1'b1 || cmds[4].cmd != CMD_ZQCL) failures++;
    end
    checks++; if (rn_low_during_c1 || !done) failures++;
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
