// tb_cmd_mux: host commands pass in Normal mode with one cycle of delay;
// maintenance commands pass while maint_req is high; the write-data select
// trails the command select by CWL cycles (checked on both switch edges);
// mode values 001/010; host commands dropped in Maintenance mode are counted.
module tb_cmd_mux;
  import cube_pkg::*;
  localparam int CWL = 4;
  logic clk = 0, rst_n = 0, mreq = 0;
  ddr_cmd_t hc, mc, co;
  word_t hw, mw, wo;
  mode_e mode;
  logic [15:0] coll;
  int checks = 0, failures = 0;

  cmd_mux #(.CWL(CWL)) dut (.clk, .rst_n, .host_cmd_i(hc), .host_wdata_i(hw),
    .maint_req_i(mreq), .maint_cmd_i(mc), .maint_wdata_i(mw), .cmd_o(co),
    .wdata_o(wo), .mode_o(mode), .collisions_o(coll));
  always #5 clk = ~clk;

  initial begin
    hc = '{cmd: CMD_ACT, ba: 3'd1, addr: 16'h1111};
    mc = '{cmd: CMD_RD,  ba: 3'd2, addr: 16'h2222};
    hw = {4{32'hAAAA_0001}}; mw = {4{32'h5555_0002}};
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    checks++; if (co !== hc || mode !== MODE_NORMAL || wo !== hw) failures++;
    hc = CMD_IDLE;
    mreq = 1; #1;
    checks++; if (wo !== hw) failures++;           // data select not yet switched
    @(posedge clk); #1;
    checks++; if (co !== mc || mode !== MODE_MAINT || mode != 3'b010) failures++;
    for (int i = 1; i < CWL; i++) begin
      checks++; if (wo !== hw) failures++;
      @(posedge clk); #1;
    end
    checks++; if (wo !== mw) failures++;          // CWL cycles after the switch
    mreq = 0; @(posedge clk); #1;
    checks++; if (co !== hc || mode != 3'b001) failures++;
    for (int i = 1; i < CWL; i++) begin
      checks++; if (wo !== mw) failures++;
      @(posedge clk); #1;
    end
    checks++; if (wo !== hw) failures++;
    // collision: host ACT while in maintenance
    mreq = 1; hc = '{cmd: CMD_ACT, ba: 3'd0, addr: '0};
    @(posedge clk); #1; mreq = 0; hc = CMD_IDLE;
    checks++; if (coll != 1) failures++;
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
