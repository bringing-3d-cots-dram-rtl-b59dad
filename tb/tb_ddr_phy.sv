// tb_ddr_phy: one PHY driving the behavioural DDR3 die. Checks: power-up
// initialisation reaches the die (4 MRS + ZQCL), a write burst lands in the
// die, a read burst comes back with rvalid exactly CL+2 cycles after the RD
// entered the PHY, a disabled command becomes NOP, C1 re-sends the mode
// registers without resetting the die, self-refresh drops CKE, power-off
// erases the die and holds it in reset, and no protocol error is seen.
module tb_ddr_phy;
  import cube_pkg::*;
  localparam int CL = 7, CWL = 6;
  logic clk = 0, rst_n = 0, power = 0, c1 = 0, en = 1;
  logic done, busy, rv;
  ddr_cmd_t cmd = CMD_IDLE;
  dq_t wd = '0, rd;
  logic rst_d, cke, cs_n, ras_n, cas_n, we_n, odt, oe;
  logic [2:0] ba; logic [15:0] addr; dq_t dqo, dqi;
  int checks = 0, failures = 0;

  ddr_phy #(.CL(CL), .CWL(CWL), .T_RST(8), .T_CKE(8), .T_ZQINIT(16)) dut (
    .clk, .rst_n, .power_i(power), .c1_i(c1), .init_done_o(done), .busy_o(busy),
    .cmd_i(cmd), .en_i(en), .wdata_i(wd), .rdata_o(rd), .rvalid_o(rv),
    .ddr_reset_n(rst_d), .ddr_cke(cke), .ddr_cs_n(cs_n), .ddr_ras_n(ras_n), .ddr_cas_n(cas_n),
    .ddr_we_n(we_n), .ddr_odt(odt), .ddr_ba(ba), .ddr_addr(addr), .ddr_dq_o(dqo),
    .ddr_dq_oe(oe), .ddr_dq_i(dqi));
  ddr3_die_model #(.CL(CL), .CWL(CWL)) die (.clk, .reset_n(rst_d), .cke, .cs_n, .ras_n,
    .cas_n, .we_n, .ba, .addr, .dq_i(dqo), .dq_oe(oe), .dq_o(dqi));
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic issue(ddr_cmd_t c);
    cmd = c; @(posedge clk); #1; cmd = CMD_IDLE;
  endtask

  initial begin
    dq_t beats [BL];
    int  got;
    repeat (2) @(posedge clk); rst_n = 1;
    power = 1;
    wait (done); repeat (3) @(posedge clk); #1;
    chk(!(die.n_mrs != 4 || die.n_zq != 1), "check 1");
    // write burst to bank 2 row 0x123 col 0x40
    issue('{cmd: CMD_ACT, ba: 3'd2, addr: 16'h0123});
    repeat (6) @(posedge clk); #1;
    for (int i = 0; i < BL; i++) beats[i] = 16'($urandom);
    cmd = '{cmd: CMD_WR, ba: 3'd2, addr: 16'h0040};
    for (int k = 0; k < CWL + BL + 2; k++) begin
      if (k >= CWL && k < CWL + BL) wd = beats[k - CWL];
      @(posedge clk); #1; cmd = CMD_IDLE;
    end
    repeat (4) @(posedge clk); #1;
    for (int i = 0; i < BL; i++) begin
      chk(!(die.peek(3'd2, 16'h0123, 10'(16'h40 + i)) !== beats[i]), "check 2");
    end
    // read it back, check latency
    cmd = '{cmd: CMD_RD, ba: 3'd2, addr: 16'h0040};
    got = 0;
    for (int k = 0; k < CL + BL + 6; k++) begin
      @(posedge clk); #1; cmd = CMD_IDLE;
      // k+1 cycles after the RD entered
      if (rv) begin
        checks++;
        if (k + 1 != CL + 2 + got || rd !== beats[got]) failures++;
        got++;
      end
    end
    chk(!(got != BL), "check 3");
    issue('{cmd: CMD_PREA, ba: 3'd0, addr: 16'h0000});
    // disabled write does not reach the die
    got = die.n_act;
    en = 0; issue('{cmd: CMD_ACT, ba: 3'd1, addr: 16'h0001}); en = 1;
    repeat (2) @(posedge clk); #1;
    chk(die.n_act == got, "disabled ACT not sent");
    // C1 conditioning
    @(negedge clk); c1 = 1; @(negedge clk); c1 = 0;
    wait (!busy); repeat (2) @(posedge clk); #1;
    chk(!(die.n_mrs != 8 || die.n_zq != 2), "check 5");
    chk(!(die.peek(3'd2, 16'h0123, 10'h40) !== beats[0]), "check 6");
    // self refresh
    cmd = '{cmd: CMD_SRE, ba: 3'd0, addr: 16'h0000};
    @(posedge clk); #1; cmd = '{cmd: CMD_DES, ba: 3'd0, addr: 16'h0000};
    @(posedge clk); @(posedge clk); #1; cmd = CMD_IDLE;
    chk(!(cke), "check 7");
    issue('{cmd: CMD_NOP, ba: 3'd0, addr: 16'h0000});
    @(posedge clk); #1;
    chk(!(!cke), "check 8");
    // power off
    power = 0; repeat (3) @(posedge clk); #1;
    chk(!(rst_d || !busy), "check 9");
    chk(!(die.peek(3'd2, 16'h0123, 10'h40) !== 16'h0), "check 10");
    chk(!(die.proto_err != 0), "check 11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
