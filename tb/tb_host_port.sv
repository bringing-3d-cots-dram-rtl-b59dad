// tb_host_port: DDR3 pin decoding (every command, A10 for PRE/PREA, CKE for
// self-refresh entry), one-cycle command/data registers, and the width masks
// x8..x128 on write and read data.
module tb_host_port;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] width = 3'd4;
  logic cke = 1, cs_n = 1, ras_n = 1, cas_n = 1, we_n = 1;
  logic [2:0] ba = 0;
  logic [15:0] addr = 0;
  word_t wd = '0, rd_o, wd_o, rd_i;
  logic rv_o, rv_i = 0;
  ddr_cmd_t co;
  int checks = 0, failures = 0;

  host_port dut (.clk, .rst_n, .width_i(width), .cke_i(cke), .cs_n_i(cs_n), .ras_n_i(ras_n),
    .cas_n_i(cas_n), .we_n_i(we_n), .ba_i(ba), .addr_i(addr), .wdata_i(wd),
    .rdata_o(rd_o), .rvalid_o(rv_o), .cmd_o(co), .wdata_o(wd_o), .rdata_i(rd_i), .rvalid_i(rv_i));
  always #5 clk = ~clk;

  task automatic drive(logic [3:0] p, logic a10, logic k, cmd_e exp);
    {cs_n, ras_n, cas_n, we_n} = p; addr = {5'd0, a10, 10'h155}; cke = k; ba = 3'(p);
    @(posedge clk); #1;
    checks++;
    if (co.cmd !== exp || co.addr !== addr || co.ba !== ba) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    drive(4'b1111, 0, 1, CMD_DES);
    drive(4'b0111, 0, 1, CMD_NOP);
    drive(4'b0011, 0, 1, CMD_ACT);
    drive(4'b0101, 0, 1, CMD_RD);
    drive(4'b0100, 0, 1, CMD_WR);
    drive(4'b0010, 0, 1, CMD_PRE);
    drive(4'b0010, 1, 1, CMD_PREA);
    drive(4'b0001, 0, 1, CMD_REF);
    drive(4'b0001, 0, 0, CMD_SRE);
    drive(4'b0110, 0, 1, CMD_ZQCL);
    drive(4'b0000, 0, 1, CMD_MRS);
    for (int w = 0; w <= 4; w++) begin
      word_t m;
      m = (w == 4) ? '1 : ((word_t'(1) << (8 << w)) - 1);
      width = 3'(w);
      wd = {4{$urandom}}; rd_i = {4{$urandom}}; rv_i = 1;
      @(posedge clk); #1;
      checks++; if (wd_o !== (wd & m)) failures++;
      checks++; if (rd_o !== (rd_i & m) || !rv_o) failures++;
    end
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
