// tb_cube_ctrl_top: the whole controller with fourteen behavioural DDR3
// dies, a host that drives DDR3 commands and an SPI master. Short init
// timings and a small maintenance walk (2 row bits, 2 column-burst bits) keep
// it quick; the host only uses addresses inside the walked range.
// Sequence: power-up (per-die init, zeroization, Maintenance mode then
// Normal); host writes/reads with the read latency checked against CL+5 and
// against twice CL; bank spiraling seen at the die pins; a flipped bit
// corrected on read and logged per lane; scrubbing repairs a flipped bit in
// the windows that host refreshes open (mode switches back and forth); a
// die in SEFI is read through, detected by the error log, power-cycled and
// rebuilt; the cold spare replaces a lane and is rebuilt; C1 conditioning of
// one die; current anomaly -> repair; hot refresh rate; x64 host width;
// host self-refresh; March X BIST over SPI with the Idle pin. Every mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_cube_ctrl_top;
  import cube_pkg::*;
  localparam int CL = 7, CWL = 6, T_RCD = 6, T_RP = 6, T_RFC = 105, RW = 2, CW = 2;
  localparam int EXT = 80;

  logic clk = 0, rst_n = 0, zeroize = 1;
  logic hcke = 1, hcs_n = 1, hras_n = 1, hcas_n = 1, hwe_n = 1;
  logic [2:0] hba = 0; logic [15:0] haddr = 0;
  word_t hwd = '0, hrd; logic hrv, hidle = 0;
  logic sclk = 0, scs_n = 1, smosi = 0, smiso;
  logic [15:0] temp = 16'd40;
  logic adc_smp = 0; logic [11:0] adc [N_DIES];
  die_mask_t pwr, init_done;
  logic d_rst [N_DIES]; logic d_cke [N_DIES]; logic d_cs [N_DIES]; logic d_ras [N_DIES];
  logic d_cas [N_DIES]; logic d_we [N_DIES]; logic d_odt [N_DIES];
  logic [2:0] d_ba [N_DIES]; logic [15:0] d_addr [N_DIES];
  dq_t d_dqo [N_DIES]; logic d_oe [N_DIES]; dq_t d_dqi [N_DIES];
  mode_e mode; logic pdone; lane_mask_t sefi; logic [15:0] coll;
  int checks = 0, failures = 0;
  wire [31:0] n_wr_w [N_DIES];
  wire [31:0] n_ref_w [N_DIES];
  wire [31:0] proto_w [N_DIES];
  wire [2:0]  last_ba_w [N_DIES];

  cube_ctrl_top #(.CL(CL), .CWL(CWL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC),
    .T_RST(20), .T_CKE(20), .T_ZQINIT(32), .T_OFF(16), .WALK_ROW_W(RW), .WALK_COL_W(CW)) dut (
    .clk, .rst_n, .zeroize_i(zeroize),
    .host_cke(hcke), .host_cs_n(hcs_n), .host_ras_n(hras_n), .host_cas_n(hcas_n), .host_we_n(hwe_n),
    .host_ba(hba), .host_addr(haddr), .host_wdata(hwd), .host_rdata(hrd), .host_rvalid(hrv),
    .host_idle(hidle), .spi_sclk(sclk), .spi_cs_n(scs_n), .spi_mosi(smosi), .spi_miso(smiso),
    .temp_i(temp), .adc_sample_i(adc_smp), .adc_i(adc), .die_power_o(pwr),
    .ddr_reset_n(d_rst), .ddr_cke(d_cke), .ddr_cs_n(d_cs), .ddr_ras_n(d_ras), .ddr_cas_n(d_cas),
    .ddr_we_n(d_we), .ddr_odt(d_odt), .ddr_ba(d_ba), .ddr_addr(d_addr), .ddr_dq_o(d_dqo),
    .ddr_dq_oe(d_oe), .ddr_dq_i(d_dqi), .mode_o(mode), .pwrup_done_o(pdone),
    .phy_init_done_o(init_done), .sefi_o(sefi), .collisions_o(coll));

  for (genvar d = 0; d < N_DIES; d++) begin : g_die
    ddr3_die_model #(.CL(CL), .CWL(CWL), .T_RCD(T_RCD)) die (
      .clk, .reset_n(d_rst[d]), .cke(d_cke[d]), .cs_n(d_cs[d]), .ras_n(d_ras[d]),
      .cas_n(d_cas[d]), .we_n(d_we[d]), .ba(d_ba[d]), .addr(d_addr[d]),
      .dq_i(d_dqo[d]), .dq_oe(d_oe[d]), .dq_o(d_dqi[d]));
    assign n_wr_w[d] = die.n_wr;
    assign n_ref_w[d] = die.n_ref;
    assign proto_w[d] = die.proto_err;
    assign last_ba_w[d] = die.last_act_ba;
  end

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int m_modesw = 0, m_maint_cyc = 0;
  mode_e mode_q = MODE_NORMAL;
  int proto_q = 0, coll_q = 0;
  lane_mask_t sefi_seen = '0;
  always @(posedge clk) begin
    if (rst_n) sefi_seen |= sefi;
    if (sum_proto() != proto_q) begin
      $display("protocol error count %0d at %0t", sum_proto(), $time); proto_q = sum_proto();
    end
    if (coll != coll_q) begin $display("collision at %0t", $time); coll_q = coll; end
    if (mode != mode_q) m_modesw++;
    if (mode == MODE_MAINT) m_maint_cyc++;
    mode_q <= mode;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  // ---------------- host DDR3 driver ----------------
  task automatic hpins(logic [3:0] p, logic [2:0] b, logic [15:0] a);
    {hcs_n, hras_n, hcas_n, hwe_n} = p; hba = b; haddr = a;
  endtask
  task automatic hnop(); hpins(4'b0111, 0, 0); endtask

  task automatic host_write(logic [2:0] b, logic [15:0] row, logic [9:0] col, word_t data [BL]);
    hpins(4'b0011, b, row); tick(); hnop(); tick(T_RCD - 1);
    hpins(4'b0100, b, {6'd0, col});
    for (int k = 1; k <= CWL + BL; k++) begin
      tick(); if (k == 1) hnop();
      if (k >= CWL && k < CWL + BL) hwd = data[k - CWL];
    end
    tick(6);
    hpins(4'b0010, b, 16'h0400); tick(); hnop(); tick(T_RP);
  endtask

  int lat_first;
  task automatic host_read(logic [2:0] b, logic [15:0] row, logic [9:0] col, output word_t data [BL]);
    int got;
    hpins(4'b0011, b, row); tick(); hnop(); tick(T_RCD - 1);
    hpins(4'b0101, b, {6'd0, col});
    got = 0; lat_first = -1;
    for (int k = 1; k <= CL + BL + 10; k++) begin
      tick(); if (k == 1) hnop();
      if (hrv && got < BL) begin
        if (got == 0) lat_first = k;
        data[got] = hrd; got++;
      end
    end
    hpins(4'b0010, b, 16'h0400); tick(); hnop(); tick(T_RP);
  endtask

  // host refresh with the agreed extension: the controller may work in it
  task automatic host_ref();
    hpins(4'b0001, 0, 0); tick(); hnop(); tick(T_RFC + EXT + 4);
  endtask

  // ---------------- SPI master ----------------
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
  task automatic spi_wr(logic [6:0] a, logic [15:0] v);
    logic [15:0] dummy; spi(1, a, v, dummy);
  endtask

  // ---------------- reference data ----------------
  word_t ref_mem [int];   // key: {ba, row, col-burst} * BL + beat
  function automatic int key(logic [2:0] b, logic [15:0] r, logic [9:0] c, int beat);
    return ((int'(b) << 12) | (int'(r[RW-1:0]) << 8) | int'(c)) * BL + beat;
  endfunction

  task automatic wr_rand(logic [2:0] b, logic [15:0] r, logic [9:0] c);
    word_t d [BL];
    for (int i = 0; i < BL; i++) begin
      d[i] = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[key(b, r, c, i)] = d[i];
    end
    host_write(b, r, c, d);
  endtask

  int n_rd_ok = 0, n_rd_bad = 0;
  task automatic rd_check(logic [2:0] b, logic [15:0] r, logic [9:0] c, input string what);
    word_t d [BL];
    int ok;
    host_read(b, r, c, d);
    ok = (lat_first == CL + 5);
    for (int i = 0; i < BL; i++) if (d[i] !== ref_mem[key(b, r, c, i)]) ok = 0;
    chk(ok == 1, what);
    if (!ok) begin
      $display("  lat=%0d b=%0d r=%0d c=%0d", lat_first, b, r, c);
      for (int i = 0; i < BL; i++) if (d[i] !== ref_mem[key(b, r, c, i)]) $display("  beat %0d got %h exp %h", i, d[i], ref_mem[key(b, r, c, i)]);
    end
    if (ok) n_rd_ok++; else n_rd_bad++;
  endtask

  // value a die should hold for a host burst: lane l bits of the word
  function automatic dq_t lane_bits(word_t w, int l);
    dq_t v;
    for (int r = 0; r < ROWS; r++) begin
      logic [7:0] byt;
      byt = w[r*8 +: 8];
      v[r] = (l < N_DATA) ? byt[l] : hsiao_check(byt)[l - N_DATA];
    end
    return v;
  endfunction

  // compare a die's stored bursts with the reference (bank spiraled)
  function automatic int die_matches(int d, int l);
    int bad;
    bad = 0;
    foreach (ref_mem[k]) begin
      int beat, c, r, b;
      beat = k % BL; c = (k / BL) & 255; r = ((k / BL) >> 8) & 15; b = (k / BL) >> 12;
      if (g_die_peek(d, 3'(b + d), 16'(r), 10'(c + beat)) !== lane_bits(ref_mem[k], l)) bad++;
    end
    return bad;
  endfunction

  function automatic dq_t g_die_peek(int d, logic [2:0] b, logic [15:0] r, logic [9:0] c);
    unique case (d)
      0: return g_die[0].die.peek(b, r, c);   1: return g_die[1].die.peek(b, r, c);
      2: return g_die[2].die.peek(b, r, c);   3: return g_die[3].die.peek(b, r, c);
      4: return g_die[4].die.peek(b, r, c);   5: return g_die[5].die.peek(b, r, c);
      6: return g_die[6].die.peek(b, r, c);   7: return g_die[7].die.peek(b, r, c);
      8: return g_die[8].die.peek(b, r, c);   9: return g_die[9].die.peek(b, r, c);
      10: return g_die[10].die.peek(b, r, c); 11: return g_die[11].die.peek(b, r, c);
      12: return g_die[12].die.peek(b, r, c); default: return g_die[13].die.peek(b, r, c);
    endcase
  endfunction

  int total_proto;
  function automatic int sum_proto();
    int s;
    s = 0;
    for (int d = 0; d < N_DIES; d++) s += int'(proto_w[d]);
    return s;
  endfunction

  initial begin
    logic [15:0] v, v2;
    int m_zero, m_spiral, m_correct, m_scrub, m_window, m_sefi, m_spare, m_rebuild;
    int m_c1, m_bist, m_sref, m_width, m_anom, m_hot, m_ctrl_ref;
    int t0, refs_cold, refs_hot, mrs0;
    for (int d = 0; d < N_DIES; d++) adc[d] = 12'd1000;

    // ================= power-up =================
    repeat (3) @(posedge clk); rst_n = 1; tick();
    chk(mode == MODE_MAINT, "Maintenance mode at power-up");
    wait (pdone); tick(4);
    chk(init_done == 14'h1FFF && pwr == 14'h1FFF, "13 dies initialised, spare cold");
    chk(g_die[0].die.n_mrs == 4 && g_die[12].die.n_zq == 1 && g_die[13].die.n_mrs == 0, "init commands at dies");
    chk(mode == MODE_NORMAL, "Normal mode after power-up");
    m_zero = 0;
    for (int d = 0; d < 13; d++) if (n_wr_w[d] == (8 << (RW + CW))) m_zero++;
    chk(m_zero == 13, "zeroization wrote every burst on every die");

    // ================= host traffic =================
    for (int b = 0; b < 8; b += 3)
      for (int r = 0; r < 4; r += 3)
        for (int c = 0; c < 32; c += 16) wr_rand(3'(b), 16'(r), 10'(c));
    foreach (ref_mem[k]) if (k % BL == 0) rd_check(3'((k / BL) >> 12), 16'(((k / BL) >> 8) & 15), 10'((k / BL) & 255), "host read back");
    chk(CL + 5 <= 2 * CL, "read latency within twice CL");
    // spiraling: last host ACT went to bank 6 row 3; die d must have seen bank 6+d
    m_spiral = 0;
    for (int d = 0; d < 13; d++) if (last_ba_w[d] == 3'(6 + d)) m_spiral++;
    chk(m_spiral == 13, "bank spiraling at the die pins");

    // ================= single-bit error corrected and logged =================
    g_die[3].die.flip(3'(0 + 3), 16'd0, 10'd2, 5);
    rd_check(3'd0, 16'd0, 10'd0, "read through flipped bit");
    spi(0, 7'h23, 0, v);
    spi(0, 7'h14, 0, v2);
    m_correct = (v == 1 && v2 >= 1) ? 1 : 0;
    chk(m_correct == 1, "error logged on lane 3");

    // ================= scrub in host refresh windows =================
    spi_wr(7'h03, 16'd20);                   // scrub interval
    g_die[5].die.flip(3'(3 + 5), 16'd3, 10'd16 + 10'd1, 9);
    t0 = m_modesw;
    for (int i = 0; i < 70; i++) begin
      host_ref();
      if (i % 10 == 0) rd_check(3'd3, 16'd3, 10'd16, "read while scrubbing");
    end
    spi(0, 7'h17, 0, v);                     // scrub count
    spi(0, 7'h1D, 0, v2);                    // scrub write-backs
    m_scrub = v2;
    m_window = m_modesw - t0;
    chk(v >= 60 && v2 >= 2, "scrub steps and repairs in refresh windows");
    chk(die_matches(5, 5) == 0 && die_matches(3, 3) == 0, "scrub repaired the dies");
    chk(m_window >= 40, "mode switched for interleaved maintenance");
    chk(coll == 0, "no host command dropped");

    // ================= SEFI on die 6 =================
    spi_wr(7'h05, 16'd40);                   // lower SEFI threshold
    g_die[6].die.set_sefi(1);
    for (int i = 0; i < 3; i++)
      foreach (ref_mem[k]) if (k % BL == 0) rd_check(3'((k / BL) >> 12), 16'(((k / BL) >> 8) & 15), 10'((k / BL) & 255), "read through SEFI die");
    tick(4);
    wait (sefi_seen[6] || sefi_seen != 0); tick(2);
    chk(sefi_seen == lane_mask_t'(1 << 6), "SEFI detected on lane 6 only");
    hidle = 1;                               // let the rebuild run
    t0 = 0;
    while (t0 < 200000) begin
      spi(0, 7'h18, 0, v);
      if (v >= 1) break;
      t0 += 1000; tick(1000);
    end
    hidle = 0; tick(80);             // Idle release: let a started operation end
    m_sefi = (g_die[6].die.sefi == 0) ? 1 : 0;   // the die was reset by the power cycle
    m_rebuild = v;
    chk(m_sefi == 1 && v >= 1, "power cycle and rebuild after SEFI");
    chk(die_matches(6, 6) == 0, "die 6 rebuilt");
    foreach (ref_mem[k]) if (k % BL == 0) rd_check(3'((k / BL) >> 12), 16'(((k / BL) >> 8) & 15), 10'((k / BL) & 255), "read after rebuild");

    // ================= cold spare for lane 9 =================
    spi_wr(7'h02, 16'h0904);                 // lane 9, x128
    spi_wr(7'h01, 16'h0323);                 // scrub, spiral, spare_en, autorepair, rebuild_start
    hidle = 1;
    t0 = 0;
    while (t0 < 200000) begin
      spi(0, 7'h18, 0, v);
      if (v >= 2) break;
      t0 += 1000; tick(1000);
    end
    hidle = 0; tick(80);             // Idle release: let a started operation end
    $display("spare: rebuilds=%0d pwr=%b t0=%0d", v, pwr, t0);
    m_spare = (pwr[13] && !pwr[9]) ? 1 : 0;
    chk(m_spare == 1, "spare powered, die 9 off");
    chk(die_matches(13, 9) == 0, "spare holds lane 9");
    foreach (ref_mem[k]) if (k % BL == 0) rd_check(3'((k / BL) >> 12), 16'(((k / BL) >> 8) & 15), 10'((k / BL) & 255), "read with spare");

    // ================= C1 conditioning of die 2 =================
    mrs0 = g_die[2].die.n_mrs;
    spi_wr(7'h02, 16'h0204);
    hidle = 1;
    spi_wr(7'h01, 16'h0343);                 // c1_start
    tick(1000);
    hidle = 0; tick(80);             // Idle release: let a started operation end
    m_c1 = (g_die[2].die.n_mrs == mrs0 + 4) ? 1 : 0;
    chk(m_c1 == 1, "C1 rewrote the mode registers of die 2");
    chk(die_matches(2, 2) == 0, "C1 kept the data of die 2");

    // ================= current anomaly on die 11 =================
    adc[11] = 12'd1500;
    @(negedge clk); adc_smp = 1; @(negedge clk); adc_smp = 0; adc[11] = 12'd1000;
    hidle = 1;
    t0 = 0;
    while (t0 < 200000) begin
      spi(0, 7'h18, 0, v);
      if (v >= 3) break;
      t0 += 1000; tick(1000);
    end
    hidle = 0; tick(80);             // Idle release: let a started operation end
    spi(0, 7'h1B, 0, v2);
    m_anom = (v >= 3 && v2 >= 2) ? 1 : 0;
    chk(m_anom == 1, "current anomaly repaired");
    chk(die_matches(11, 11) == 0, "die 11 rebuilt");

    // ================= controller refresh while Idle, hot vs cold =================
    spi_wr(7'h01, 16'h0302);                 // scrub off
    spi_wr(7'h04, 16'd400);
    hidle = 1; tick(10);
    refs_cold = n_ref_w[0]; tick(4000); refs_cold = n_ref_w[0] - refs_cold;
    temp = 16'd95; tick(10);
    refs_hot = n_ref_w[0]; tick(4000); refs_hot = n_ref_w[0] - refs_hot;
    hidle = 0; temp = 16'd40; tick(200);
    m_ctrl_ref = refs_cold;
    m_hot = (refs_hot >= 2 * refs_cold - 1) ? 1 : 0;
    chk(refs_cold >= 9 && refs_cold <= 11, "controller refresh every 400 cycles");
    chk(m_hot == 1, "refresh twice as often when hot");

    // ================= x64 host width =================
    spi_wr(7'h02, 16'h0003);
    begin
      word_t d [BL];
      word_t q [BL];
      for (int i = 0; i < BL; i++) d[i] = '1;
      host_write(3'd1, 16'd1, 10'd8, d);
      host_read(3'd1, 16'd1, 10'd8, q);
      m_width = 1;
      for (int i = 0; i < BL; i++) if (q[i] !== {64'd0, {64{1'b1}}}) m_width = 0;
      chk(m_width == 1, "x64 host uses the low 64 bits");
    end
    spi_wr(7'h02, 16'h0004);

    // ================= host self-refresh =================
    begin
      int lows;
      hcke = 0; hpins(4'b0001, 0, 0); tick(); hpins(4'b1111, 0, 0);
      lows = 0;
      for (int i = 0; i < 300; i++) begin
        tick();
        if (!d_cke[0] && !d_cke[12] && !d_cke[13]) lows++;
      end
      hcke = 1; hnop(); tick(6);
      m_sref = (lows >= 290 && d_cke[0]) ? 1 : 0;
      chk(m_sref == 1, "self-refresh: CKE low at the dies, then back");
      tick(T_RFC + 10);
      rd_check(3'd0, 16'd0, 10'd0, "read after self-refresh");
    end

    // ================= March X BIST with the Idle pin =================
    spi_wr(7'h02, 16'h0044);                 // pattern 4 = March X
    hidle = 1;
    spi_wr(7'h01, 16'h0312);                 // bist_start
    t0 = 0;
    while (t0 < 400000) begin
      spi(0, 7'h10, 0, v);
      if (!v[4]) break;
      t0 += 1000; tick(1000);
    end
    hidle = 0; tick(80);             // Idle release: let a started operation end
    m_bist = (!v[4] && !v[5]) ? 1 : 0;
    chk(m_bist == 1, "March X BIST passed");
    chk(g_die[13].die.peek(3'd0 + 3'd13, 16'd0, 10'd0) == 16'h0, "BIST left zeros");

    // a mechanism that never happened is a failure
    chk(m_zero > 0, "mechanism: zeroization");
    chk(m_spiral > 0, "mechanism: bank spiraling");
    chk(m_correct > 0, "mechanism: error correction and logging");
    chk(m_scrub > 0, "mechanism: scrub repair");
    chk(m_window > 0, "mechanism: Normal/Maintenance switching");
    chk(m_sefi > 0, "mechanism: SEFI power cycle");
    chk(m_rebuild > 0, "mechanism: rebuild");
    chk(m_spare > 0, "mechanism: cold spare");
    chk(m_c1 > 0, "mechanism: C1 conditioning");
    chk(m_anom > 0, "mechanism: current anomaly");
    chk(m_ctrl_ref > 0, "mechanism: controller refresh");
    chk(m_hot > 0, "mechanism: variable refresh rate");
    chk(m_width > 0, "mechanism: host width");
    chk(m_sref > 0, "mechanism: self-refresh");
    chk(m_bist > 0, "mechanism: March X BIST");
    chk(n_rd_ok > 0, "mechanism: host reads");

    total_proto = sum_proto();
    chk(total_proto == 0, "no DDR3 protocol error at any die");
    chk(coll == 0, "no host command dropped");

    $display("mechanisms: zeroize=%0d spiral=%0d correct=%0d scrub_fix=%0d mode_switches=%0d sefi_repair=%0d rebuilds=%0d spare=%0d c1=%0d anomaly=%0d ctrl_refresh=%0d hot=%0d width=%0d sref=%0d bist=%0d reads_ok=%0d",
             m_zero, m_spiral, m_correct, m_scrub, m_window, m_sefi, m_rebuild, m_spare, m_c1, m_anom, m_ctrl_ref, m_hot, m_width, m_sref, m_bist, n_rd_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
