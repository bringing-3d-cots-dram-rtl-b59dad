// tb_idle_detector: a host REF opens a window after the dies' real tRFC that
// lasts while at least op_len cycles of the host's extension remain; the
// Idle pin (after two synchroniser flops) and the SPI request grant at once;
// CS# inactive grants only with cs_mode. Cycle positions are checked.
module tb_idle_detector;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0;
  cmd_e hc = CMD_NOP;
  logic pin = 0, spi = 0, csm = 0, grant, hidle;
  logic [31:0] wins;
  int checks = 0, failures = 0;
  localparam int BUSY = 20, EXT = 30, OPL = 10;

  idle_detector dut (.clk, .rst_n, .host_cmd_i(hc), .idle_pin_i(pin), .spi_idle_i(spi),
    .cs_mode_i(csm), .busy_ref_i(12'(BUSY)), .busy_zq_i(12'(8)), .ext_i(12'(EXT)),
    .op_len_i(12'(OPL)), .grant_o(grant), .host_idle_o(hidle), .windows_o(wins));
  always #5 clk = ~clk;

  initial begin
    int first, last, n;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    checks++; if (grant) failures++;
    hc = CMD_REF; @(posedge clk); #1; hc = CMD_NOP;
    first = -1; last = -1; n = 0;
    for (int c = 1; c < 80; c++) begin
      if (grant) begin if (first < 0) first = c; last = c; n++; end
      @(posedge clk); #1;
    end
    // counter = BUSY+EXT after the REF edge; window while OPL <= cnt <= EXT;
    // c counts from the REF edge + 1, grant is registered: first = BUSY + 2
    checks++; if (first != BUSY + 2) begin failures++; $display("first=%0d n=%0d", first, n); end
    checks++; if (n != EXT - OPL + 1) begin failures++; $display("n=%0d", n); end
    checks++; if (wins != 1) failures++;
    // idle pin: two synchroniser flops + grant register
    pin = 1; @(posedge clk); #1;
    checks++; if (grant) failures++;
    @(posedge clk); #1; @(posedge clk); #1;
    checks++; if (!grant || !hidle) failures++;
    pin = 0; repeat (4) @(posedge clk); #1;
    checks++; if (grant) failures++;
    spi = 1; @(posedge clk); #1;
    checks++; if (!grant) failures++;
    spi = 0; @(posedge clk); #1;
    hc = CMD_DES; @(posedge clk); #1;
    checks++; if (grant) failures++;
    csm = 1; @(posedge clk); #1;
    checks++; if (!grant) failures++;
    hc = CMD_ACT; @(posedge clk); #1;
    checks++; if (grant) failures++;
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
