// tb_cube_full: the controller at its default parameters (full DDR3 power-up
// timing, whole-die maintenance walk) with fourteen behavioural dies. One
// complete operation: power-up initialisation of the 13 active dies (reset
// and CKE waits of 200 us / 500 us at 300 MHz, mode registers, ZQ
// calibration) with the spare left cold, a host write burst and its read
// back at CL+5 cycles, the ID register over SPI, and one scrub step run in
// the window after a host refresh. The zeroize strap is left low: walking the
// whole 8 Gb array would take many seconds of simulated time.
module tb_cube_full;
  import cube_pkg::*;
  localparam int CL = 7, CWL = 6, T_RCD = 6, T_RP = 6, T_RFC = 105;

  logic clk = 0, rst_n = 0;
  logic hcke = 1, hcs_n = 1, hras_n = 1, hcas_n = 1, hwe_n = 1;
  logic [2:0] hba = 0; logic [15:0] haddr = 0;
  word_t hwd = '0, hrd; logic hrv;
  logic sclk = 0, scs_n = 1, smosi = 0, smiso;
  logic [11:0] adc [N_DIES];
  die_mask_t pwr, init_done;
  logic d_rst [N_DIES]; logic d_cke [N_DIES]; logic d_cs [N_DIES]; logic d_ras [N_DIES];
  logic d_cas [N_DIES]; logic d_we [N_DIES]; logic d_odt [N_DIES];
  logic [2:0] d_ba [N_DIES]; logic [15:0] d_addr [N_DIES];
  dq_t d_dqo [N_DIES]; logic d_oe [N_DIES]; dq_t d_dqi [N_DIES];
  mode_e mode; logic pdone; lane_mask_t sefi; logic [15:0] coll;
  wire [31:0] proto_w [N_DIES];
  wire [31:0] n_mrs_w [N_DIES];
  int checks = 0, failures = 0;

  cube_ctrl_top dut (
    .clk, .rst_n, .zeroize_i(1'b0),
    .host_cke(hcke), .host_cs_n(hcs_n), .host_ras_n(hras_n), .host_cas_n(hcas_n), .host_we_n(hwe_n),
    .host_ba(hba), .host_addr(haddr), .host_wdata(hwd), .host_rdata(hrd), .host_rvalid(hrv),
    .host_idle(1'b0), .spi_sclk(sclk), .spi_cs_n(scs_n), .spi_mosi(smosi), .spi_miso(smiso),
    .temp_i(16'd40), .adc_sample_i(1'b0), .adc_i(adc), .die_power_o(pwr),
    .ddr_reset_n(d_rst), .ddr_cke(d_cke), .ddr_cs_n(d_cs), .ddr_ras_n(d_ras), .ddr_cas_n(d_cas),
    .ddr_we_n(d_we), .ddr_odt(d_odt), .ddr_ba(d_ba), .ddr_addr(d_addr), .ddr_dq_o(d_dqo),
    .ddr_dq_oe(d_oe), .ddr_dq_i(d_dqi), .mode_o(mode), .pwrup_done_o(pdone),
    .phy_init_done_o(init_done), .sefi_o(sefi), .collisions_o(coll));

  for (genvar d = 0; d < N_DIES; d++) begin : g_die
    ddr3_die_model #(.CL(CL), .CWL(CWL), .T_RCD(T_RCD)) die (
      .clk, .reset_n(d_rst[d]), .cke(d_cke[d]), .cs_n(d_cs[d]), .ras_n(d_ras[d]),
      .cas_n(d_cas[d]), .we_n(d_we[d]), .ba(d_ba[d]), .addr(d_addr[d]),
      .dq_i(d_dqo[d]), .dq_oe(d_oe[d]), .dq_o(d_dqi[d]));
    assign proto_w[d] = die.proto_err;
    assign n_mrs_w[d] = die.n_mrs;
  end

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic tick(int n = 1);
    repeat (n) begin @(posedge clk); #1; end
  endtask
  task automatic hpins(logic [3:0] p, logic [2:0] b, logic [15:0] a);
    {hcs_n, hras_n, hcas_n, hwe_n} = p; hba = b; haddr = a;
  endtask
  task automatic hnop(); hpins(4'b0111, 0, 0); endtask

  task automatic spi(input logic wr, input logic [6:0] a, input logic [15:0] wd, output logic [15:0] rd);
    logic [23:0] f;
    f = {wr, a, wd}; rd = '0;
    scs_n = 0; tick(8);
    for (int i = 23; i >= 0; i--) begin
      smosi = f[i]; tick(4); sclk = 1;
      if (i < 16) rd = {rd[14:0], smiso};
      tick(4); sclk = 0;
    end
    tick(8); scs_n = 1; tick(8);
  endtask

  initial begin
    word_t d [BL];
    int got, lat, ok, npw, nmrs, proto;
    logic [15:0] v;
    for (int i = 0; i < N_DIES; i++) adc[i] = 12'd1000;
    repeat (3) @(posedge clk); rst_n = 1; tick();
    chk(mode == MODE_MAINT, "Maintenance mode during power-up");
    wait (pdone); tick(4);
    npw = 0; nmrs = 0;
    for (int i = 0; i < N_DIES; i++) begin
      if (pwr[i]) npw++;
      if (n_mrs_w[i] == 4) nmrs++;
    end
    chk(npw == 13 && !pwr[SPARE_DIE] && init_done == 14'h1FFF, "13 dies powered and initialised");
    chk(nmrs == 13, "four mode registers written per active die");
    chk($time / 10 >= 60000 + 150000, "reset and CKE waits honoured");
    chk(mode == MODE_NORMAL, "Normal mode after power-up");

    // host write burst: bank 5, row 0x7abc, column 0x3f8
    for (int i = 0; i < BL; i++) d[i] = {$urandom, $urandom, $urandom, $urandom};
    hpins(4'b0011, 3'd5, 16'h7abc); tick(); hnop(); tick(T_RCD - 1);
    hpins(4'b0100, 3'd5, 16'h03f8);
    for (int k = 1; k <= CWL + BL; k++) begin
      tick(); if (k == 1) hnop();
      if (k >= CWL && k < CWL + BL) hwd = d[k - CWL];
    end
    tick(6);
    // read it back
    hpins(4'b0101, 3'd5, 16'h03f8); tick(); hnop();
    got = 0; lat = -1; ok = 1;
    for (int k = 1; k <= CL + BL + 10; k++) begin
      if (hrv && got < BL) begin
        if (got == 0) lat = k;
        if (hrd !== d[got]) ok = 0;
        got++;
      end
      tick();
    end
    chk(ok == 1 && got == BL, "read data equals written data");
    chk(lat == CL + 5, $sformatf("read latency CL+5 (got %0d)", lat));
    hpins(4'b0010, 0, 16'h0400); tick(); hnop(); tick(T_RP);

    spi(0, 7'h00, 0, v);
    chk(v == 16'h3D13, "SPI ID register");

    // wait past the scrub interval, then give the controller a refresh window
    tick(3100);
    hpins(4'b0001, 0, 0); tick(); hnop(); tick(T_RFC + 100);
    spi(0, 7'h17, 0, v);
    chk(v == 1, $sformatf("one scrub step in the refresh window (got %0d)", v));

    proto = 0;
    for (int i = 0; i < N_DIES; i++) proto += int'(proto_w[i]);
    chk(proto == 0, "no DDR3 protocol error");
    chk(coll == 0, "no host command dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
