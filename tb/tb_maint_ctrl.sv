// tb_maint_ctrl: the maintenance engine against a word-level model of the
// protected stack (the EDAC and dies reduced to a burst memory that answers
// a RD with BL corrected beats RD_LAT cycles later and takes WR beats CWL
// cycles after the WR). Small walk (2 row bits, 2 column-burst bits: 128
// bursts). Checked: power-up zeroization writes every burst once while the
// stack is held, with refreshes slipped in; every operation ends with a
// precharge-all; scrubbing repairs a correctable error and gives up on a
// stuck one after max_rep attempts; March X BIST runs 3N writes and 3N reads
// and leaves zeros, and flags a failing burst; rebuild writes each burst to
// one lane only; a SEFI flag leads to power cycle + rebuild, a second one to
// the spare; C1 pulses the selected lane (only while the host is idle, with
// the stack kept); a lane whose stuck-bit events reach the limit (2 here) is
// power-cycled; nothing starts without a grant.
module tb_maint_ctrl;
  import cube_pkg::*;
  localparam int CL = 7, CWL = 6, RW = 2, CW = 2, AW = 3 + RW + CW, NB = 1 << AW;
  localparam int RD_LAT = CL + 4;
  logic clk = 0, rst_n = 0;
  logic zeroize = 1, scrub_en = 0, hot = 0, autorep = 1, bist_start = 0, rb_start = 0, c1_start = 0;
  logic [15:0] scrub_int = 16'd40, refi = 16'd400;
  logic [3:0] max_rep = 4'd3, lane_sel = 4'd0;
  bist_pat_e pat = PAT_MARCHX;
  lane_mask_t sefi = '0, anomaly = '0;
  logic grant = 0, host_idle = 0, host_ref = 0, ready = 0;
  logic mreq; ddr_cmd_t cmd; word_t wd; lane_mask_t len;
  word_t rdata = '0; logic rvalid = 0, ce = 0, ue = 0;
  dq_t rerr [N_LANES];
  lane_mask_t c1, pcyc, spare, lclr, blf;
  logic pwrup_done, bist_busy, bist_fail, rb_busy;
  logic [15:0] rb_cnt, scrub_cnt, scrub_fix, stuck, ref_cnt, rep_cnt;
  int checks = 0, failures = 0;

  maint_ctrl #(.CL(CL), .CWL(CWL), .T_RFC(20), .STUCK_LIM(2), .WALK_ROW_W(RW), .WALK_COL_W(CW)) dut (
    .clk, .rst_n, .zeroize_i(zeroize), .scrub_en_i(scrub_en), .scrub_int_i(scrub_int),
    .max_rep_i(max_rep), .refi_i(refi), .hot_i(hot), .autorepair_i(autorep),
    .bist_start_i(bist_start), .bist_pat_i(pat), .rebuild_start_i(rb_start),
    .lane_sel_i(lane_sel), .c1_start_i(c1_start), .sefi_i(sefi), .anomaly_i(anomaly),
    .grant_i(grant), .host_idle_i(host_idle), .host_ref_i(host_ref), .dies_ready_i(ready),
    .maint_req_o(mreq), .cmd_o(cmd), .wdata_o(wd), .lane_en_o(len),
    .rdata_i(rdata), .rvalid_i(rvalid), .ce_i(ce), .ue_i(ue), .rerr_i(rerr),
    .c1_o(c1), .pcycle_o(pcyc), .spare_o(spare), .log_clear_o(lclr),
    .pwrup_done_o(pwrup_done), .bist_busy_o(bist_busy), .bist_fail_o(bist_fail),
    .bist_lane_fail_o(blf), .rebuild_busy_o(rb_busy), .rebuild_cnt_o(rb_cnt),
    .scrub_cnt_o(scrub_cnt), .scrub_fix_o(scrub_fix), .stuck_cnt_o(stuck),
    .ref_cnt_o(ref_cnt), .repair_cnt_o(rep_cnt));
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- burst-level stack model ----------------
  word_t mem [NB][BL];
  int    wr_cnt [NB];
  int    n_rd = 0, n_wr = 0, n_act = 0, n_prea = 0, n_ref = 0, n_lane_wr = 0, proto = 0;
  int    ce_burst = -1, stuck_burst = -1, ue_burst = -1, err_lane = 2;
  int    cyc = 0;
  logic  [2:0] open_ba; logic [15:0] open_row; logic is_open = 0;
  int    rslot [64]; int wslot [64]; lane_mask_t wlanes [64];
  logic  mreq_seen_low_in_pwrup = 0;

  function automatic int baddr(logic [2:0] b, logic [15:0] r, logic [15:0] c);
    return int'({b, r[RW-1:0], c[CW+2:3]});
  endfunction

  always @(posedge clk) begin
    int cur;
    cur = cyc;
    cyc <= cyc + 1;
    // write beats of this cycle
    if (wslot[cur % 64] >= 0) begin
      int b, beat;
      b = wslot[cur % 64] / BL; beat = wslot[cur % 64] % BL;
      if (wlanes[cur % 64] == '1) begin
        mem[b][beat] = wd;
        if (beat == 0) wr_cnt[b]++;
        if (b == ce_burst) ce_burst = -1;
      end else if (beat == 0) n_lane_wr++;
      wslot[cur % 64] = -1;
    end
    // commands
    unique case (cmd.cmd)
      CMD_ACT:  begin if (is_open) proto++; is_open = 1; open_ba = cmd.ba; open_row = cmd.addr; n_act++; end
      CMD_RD, CMD_WR: begin
        int b;
        if (!is_open || cmd.ba != open_ba) proto++;
        b = baddr(cmd.ba, open_row, cmd.addr);
        for (int i = 0; i < BL; i++)
          if (cmd.cmd == CMD_RD) rslot[(cur + RD_LAT + i) % 64] = b * BL + i;
          else begin wslot[(cur + CWL + i) % 64] = b * BL + i; wlanes[(cur + CWL + i) % 64] = len; end
        if (cmd.cmd == CMD_RD) n_rd++; else n_wr++;
      end
      CMD_PREA: begin is_open = 0; n_prea++; end
      CMD_REF:  begin if (is_open) proto++; n_ref++; end
      default: ;
    endcase
    if (!pwrup_done && ready && !mreq) mreq_seen_low_in_pwrup = 1;
    // read beats for the next cycle
    if (rslot[(cur + 1) % 64] >= 0) begin
      int b, beat;
      b = rslot[(cur + 1) % 64] / BL; beat = rslot[(cur + 1) % 64] % BL;
      rdata  <= mem[b][beat] ^ ((b == ue_burst) ? word_t'(3) : '0);
      rvalid <= 1;
      ce     <= (b == ce_burst || b == stuck_burst);
      ue     <= (b == ue_burst);
      for (int l = 0; l < N_LANES; l++) rerr[l] <= (l == err_lane && (b == ce_burst || b == stuck_burst)) ? 16'h1 : 16'h0;
      rslot[(cur + 1) % 64] = -1;
    end else begin
      rvalid <= 0; ce <= 0; ue <= 0;
      for (int l = 0; l < N_LANES; l++) rerr[l] <= '0;
    end
  end

  task automatic reset_counts();
    n_rd = 0; n_wr = 0; n_act = 0; n_prea = 0; n_ref = 0; n_lane_wr = 0;
    for (int b = 0; b < NB; b++) wr_cnt[b] = 0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int c1_seen, pc_seen, sp_seen;
    for (int i = 0; i < 64; i++) begin rslot[i] = -1; wslot[i] = -1; wlanes[i] = '1; end
    for (int b = 0; b < NB; b++) begin wr_cnt[b] = 0; for (int i = 0; i < BL; i++) mem[b][i] = {4{32'hDEADBEEF}}; end
    for (int l = 0; l < N_LANES; l++) rerr[l] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    chk(mreq, "stack held at power-up");
    ready = 1;
    wait (pwrup_done); @(posedge clk); #1;
    begin
      int ok;
      ok = 1;
      for (int b = 0; b < NB; b++) begin
        if (wr_cnt[b] != 1) ok = 0;
        for (int i = 0; i < BL; i++) if (mem[b][i] != '0) ok = 0;
      end
      chk(ok == 1, "zeroize wrote every burst once with zeros");
    end
    chk(!mreq_seen_low_in_pwrup, "held through zeroization");
    chk(n_ref > 0 && ref_cnt == 16'(n_ref), "refresh during power-up");
    chk(n_prea == n_wr, "precharge-all after every write op");
    chk(proto == 0, "protocol clean (zeroize)");
    chk(!mreq, "released after power-up");

    // -------- no grant: nothing happens --------
    reset_counts();
    scrub_en = 1;
    repeat (200) @(posedge clk); #1;
    chk(n_act == 0 && !mreq, "no operation without grant");

    // -------- scrub with repair and stuck bits --------
    ce_burst = 1; stuck_burst = 3;
    grant = 1;
    wait (scrub_cnt >= 5); @(posedge clk); #1;
    chk(ce_burst == -1, "correctable error written back");
    chk(scrub_fix == 16'd1 + 16'(max_rep), "repairs: 1 + max_rep");
    chk(stuck == 1, "stuck bit counted once");
    chk(n_prea == n_rd, "precharge-all after every read op");
    scrub_en = 0; stuck_burst = -1;
    repeat (200) @(posedge clk);

    // -------- March X BIST --------
    grant = 1; host_idle = 1;
    reset_counts();
    for (int b = 0; b < NB; b++) for (int i = 0; i < BL; i++) mem[b][i] = {4{32'h12345678}};
    pulse(bist_start);
    wait (bist_busy); wait (!bist_busy); @(posedge clk); #1;
    chk(n_wr == 3 * NB && n_rd == 3 * NB, "March X: 3N writes, 3N reads");
    chk(!bist_fail, "March X passes on a good stack");
    begin
      int ok; ok = 1;
      for (int b = 0; b < NB; b++) for (int i = 0; i < BL; i++) if (mem[b][i] != '0) ok = 0;
      chk(ok == 1, "March X leaves zeros");
    end
    // failing burst with checkerboard
    ue_burst = 17; pat = PAT_CHECKER;
    pulse(bist_start);
    wait (bist_busy); wait (!bist_busy); @(posedge clk); #1;
    chk(bist_fail, "BIST detects failing burst");
    ue_burst = -1;
    // address pattern with a per-die offset: die k holds address + k
    pat = PAT_DIE_OFS;
    pulse(bist_start);
    wait (bist_busy); wait (!bist_busy); @(posedge clk); #1;
    chk(!bist_fail, "per-die offset pattern passes on a good stack");
    begin
      int ok, b, i; dq_t v0, vk;
      ok = 1;
      b = int'($urandom_range(NB - 1)); i = int'($urandom_range(BL - 1));
      for (int d = 0; d < N_DATA; d++) begin
        for (int r = 0; r < ROWS; r++) vk[r] = mem[b][i][r*N_DATA + d];
        if (d == 0) v0 = vk;
        else if (vk != v0 + dq_t'(d)) ok = 0;
      end
      chk(ok == 1, "data die k holds die 0's value plus k");
    end
    host_idle = 0; grant = 1;

    // -------- rebuild lane 4 --------
    reset_counts();
    lane_sel = 4'd4;
    pulse(rb_start);
    wait (rb_busy); wait (!rb_busy); @(posedge clk); #1;
    chk(n_lane_wr == NB && n_rd == NB, "rebuild: every burst read and written to one lane");
    chk(rb_cnt == 1, "rebuild counted");

    // -------- SEFI: power cycle then rebuild, then spare --------
    c1_seen = 0; pc_seen = 0; sp_seen = 0;
    fork
      begin
        repeat (40000) begin
          @(posedge clk);
          if (pcyc == lane_mask_t'(1 << 2)) pc_seen++;
          if (spare == lane_mask_t'(1 << 2)) sp_seen++;
          if (c1 == lane_mask_t'(1 << 4)) c1_seen++;
          if (lclr[2]) sefi[2] = 0;
          if (pcyc != 0 || spare != 0) begin ready = 0; repeat (30) @(posedge clk); ready = 1; end
        end
      end
      begin
        sefi[2] = 1;
        wait (rb_cnt == 2); @(posedge clk);
        sefi[2] = 1;
        wait (rb_cnt == 3); @(posedge clk);
        host_idle = 1;
        pulse(c1_start);
        wait (c1 != 0); repeat (20) @(posedge clk);
        chk(mreq, "stack kept during C1");
      end
    join_any
    disable fork;
    chk(pc_seen == 1, "power cycle of lane 2");
    chk(sp_seen == 1, "spare for lane 2 on second SEFI");
    chk(rep_cnt == 2, "two repairs");
    chk(c1_seen == 1, $sformatf("C1 pulse to lane 4 (%0d)", c1_seen));
    chk(proto == 0, "protocol clean");

    // -------- a lane with repeated stuck bits is power-cycled --------
    host_idle = 0; grant = 1; err_lane = 5; stuck_burst = 3; scrub_en = 1;
    begin
      int seen; seen = 0;
      for (int i = 0; i < 200000 && !seen; i++) begin
        @(posedge clk);
        if (pcyc == lane_mask_t'(1 << 5)) seen = 1;
      end
      chk(seen == 1 && stuck >= 3, "stuck-bit limit leads to a power cycle");
    end
    scrub_en = 0; stuck_burst = -1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
