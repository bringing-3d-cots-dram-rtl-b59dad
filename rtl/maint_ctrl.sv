// maint_ctrl: the controller's own use of the stack ("Control Logic":
// memory controller plus maintenance).
//
// Everything the controller does on its own is cut into short atomic
// operations, each ending with a precharge-all so that no row stays open
// (closed-page policy: idle open banks are more sensitive to radiation):
//   OP_RD  - ACT, RD, collect the BL corrected beats, PREA
//   OP_WR  - ACT, WR with BL generated beats, PREA
//   OP_RMW - ACT, RD, WR back the corrected beats to all lanes or to one lane
//            only, PREA (row stays open in between, so no host access can
//            slip between the read and the write-back)
//   OP_REF - REF, wait tRFC
// An operation starts only when the idle detector grants it, or while the
// controller holds the stack for power-up. maint_req_o (the MUX select) is
// high from the first command of an operation to its end.
// Tasks built from these operations, highest priority first:
//   power-up : wait for every PHY to finish initialisation, then zeroize the
//              whole array through the EDAC (so every word carries valid ECC)
//              when zeroize_i is set; the stack is held all along;
//   BIST     : zeros, ones, checkerboard, address pattern, or address
//              pattern with a per-die offset (data die k holds address + k,
//              so all dies are tested in parallel with different data)
//              (write pass then read/compare pass), or March X: up(w0) up(r0,w1) down(r1,w0)
//              up(r0). Failing lanes (from the decoder's masks) and data
//              mismatches are recorded;
//   repair   : (autorepair_i) a lane flagged by the SEFI detector, the
//              current monitor or the stuck-bit count is power-cycled and
//              rebuilt; if it is flagged
//              again afterwards the cold spare is switched in and rebuilt;
//   rebuild  : RMW over the whole array writing only the target lane; the
//              lane's error log and current flag are held cleared from the
//              power cycle to the end of the rebuild;
//   C1       : while the host keeps the stack idle (DLL relock and ZQ
//              calibration take hundreds of cycles), pulses the conditioning
//              request of one lane's PHY and keeps the MUX until it is done;
//   refresh  : while the stack is held (power-up, host Idle) the controller
//              refreshes at the programmable interval, halved when hot;
//   scrub    : every scrub_int_i cycles one burst is read; on a corrected
//              error it is written back and re-read, up to max_rep_i times,
//              after which the bits count as stuck. A lane that collects
//              STUCK_LIM stuck events is repaired like a SEFI lane (a die
//              reset clears most stuck bits).
// Address walk: burst address = {bank, row, column burst}; WALK_ROW_W and
// WALK_COL_W set how much of the die is walked (defaults: the whole 8 Gb die).
// Read data of an operation is taken at the fixed latency RD_LAT after its RD.
// The task list, the scrub repair loop, the BIST patterns and March X, the
// precharge-all after each operation follow the architecture; the operation
// granularity, priorities, escalation rule and all timing values are this
// design's.
module maint_ctrl
  import cube_pkg::*;
#(
  parameter int unsigned CL         = 7,
  parameter int unsigned CWL        = 6,
  parameter int unsigned T_RCD      = 6,
  parameter int unsigned T_RP       = 6,
  parameter int unsigned T_WR       = 5,
  parameter int unsigned T_RFC      = 105,    // 350 ns at 300 MHz (8 Gb)
  parameter int unsigned WALK_ROW_W = 16,
  parameter int unsigned WALK_COL_W = 7,      // 1024 columns / BL8
  parameter int unsigned RD_LAT     = CL + 4, // RD issue to corrected beat 0
  parameter int unsigned STUCK_LIM  = 8       // stuck-bit events that make a lane be repaired
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              zeroize_i,     // zeroize at power-up
  input  logic              scrub_en_i,
  input  logic [15:0]       scrub_int_i,   // cycles between scrub steps
  input  logic [3:0]        max_rep_i,     // scrub repair attempts
  input  logic [15:0]       refi_i,        // refresh interval in cycles
  input  logic              hot_i,         // temperature high: refresh twice as often
  input  logic              autorepair_i,
  input  logic              bist_start_i,
  input  bist_pat_e         bist_pat_i,
  input  logic              rebuild_start_i,
  input  logic [3:0]        lane_sel_i,    // lane for rebuild / C1
  input  logic              c1_start_i,
  // events
  input  lane_mask_t        sefi_i,        // from the error log
  input  lane_mask_t        anomaly_i,     // from the current monitor
  input  logic              grant_i,       // idle detector
  input  logic              host_idle_i,   // host holds the bus idle
  input  logic              host_ref_i,    // the host issued a refresh
  input  logic              dies_ready_i,  // every active PHY initialised
  // command / data towards the MUX
  output logic              maint_req_o,
  output ddr_cmd_t          cmd_o,
  output word_t             wdata_o,
  output lane_mask_t        lane_en_o,     // lanes that take this command
  // corrected read data from the EDAC
  input  word_t             rdata_i,
  input  logic              rvalid_i,
  input  logic              ce_i,
  input  logic              ue_i,
  input  dq_t               rerr_i [N_LANES],
  // die management requests (one-cycle pulses)
  output lane_mask_t        c1_o,
  output lane_mask_t        pcycle_o,
  output lane_mask_t        spare_o,
  output lane_mask_t        log_clear_o,
  // status
  output logic              pwrup_done_o,
  output logic              bist_busy_o,
  output logic              bist_fail_o,
  output lane_mask_t        bist_lane_fail_o,
  output logic              rebuild_busy_o,
  output logic [15:0]       rebuild_cnt_o,
  output logic [15:0]       scrub_cnt_o,
  output logic [15:0]       scrub_fix_o,
  output logic [15:0]       stuck_cnt_o,
  output logic [15:0]       ref_cnt_o,
  output logic [15:0]       repair_cnt_o
);
  localparam int unsigned AW = BA_W + WALK_ROW_W + WALK_COL_W;
  typedef logic [AW-1:0] baddr_t;
  localparam baddr_t ADDR_LAST = '1;

  // ------------------------------------------------------------------
  // operation engine
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {OP_RD, OP_WR, OP_RMW, OP_REF} op_e;
  typedef enum logic [2:0] {O_IDLE, O_ACT, O_RD, O_WR, O_PRE, O_WAIT} ost_e;

  ost_e        ost;
  op_e         op;
  baddr_t      op_addr;
  logic        op_bg;         // pattern inversion for the write of this op
  bist_pat_e   op_pat;
  lane_mask_t  op_wlanes;     // lanes written by an RMW
  logic [7:0]  k;             // cycles since the last command
  logic        op_start, op_done;
  logic        res_ce, res_ue, res_mis;
  lane_mask_t  res_lanes;
  word_t       rbuf [BL];
  logic        exp_inv;       // expected read data is the inverted pattern

  function automatic word_t pattern(bist_pat_e p, baddr_t a, int unsigned beat, logic inv);
    word_t w;
    unique case (p)
      PAT_ONES:    w = '1;
      PAT_CHECKER: w = ((a[0] ^ beat[0]) != 0) ? {(WORD_W/2){2'b10}} : {(WORD_W/2){2'b01}};
      PAT_ADDR:    w = {(WORD_W/32){32'({a, 3'(beat)})}};
      PAT_DIE_OFS: begin
        // Each data die sees its own 16-bit value on its DQ lines: the beat
        // address plus the die number, so neighbouring dies never hold the
        // same data and a short between dies shows up as a mismatch.
        for (int d = 0; d < N_DATA; d++) begin
          dq_t v;
          v = dq_t'({a, 3'(beat)}) + dq_t'(d);
          for (int r = 0; r < ROWS; r++) w[r*N_DATA + d] = v[r];
        end
      end
      default:     w = '0;
    endcase
    return inv ? ~w : w;
  endfunction

  logic [BA_W-1:0]       a_ba;
  logic [WALK_ROW_W-1:0] a_row;
  logic [WALK_COL_W-1:0] a_colb;
  assign {a_ba, a_row, a_colb} = op_addr;

  always_comb begin
    cmd_o     = CMD_IDLE;
    lane_en_o = '1;
    unique case (ost)
      O_ACT: if (k == 0) cmd_o = '{cmd: CMD_ACT, ba: a_ba, addr: ADDR_W'(a_row)};
      O_RD:  if (k == 0) cmd_o = '{cmd: CMD_RD,  ba: a_ba, addr: ADDR_W'({a_colb, 3'b000})};
      O_WR:  if (k == 0) begin
               cmd_o = '{cmd: CMD_WR, ba: a_ba, addr: ADDR_W'({a_colb, 3'b000})};
               if (op == OP_RMW) lane_en_o = op_wlanes;
             end
      O_PRE: if (k == 0) cmd_o = '{cmd: (op == OP_REF) ? CMD_REF : CMD_PREA, ba: '0, addr: ADDR_W'(1 << 10)};
      default: ;
    endcase
  end

  // write beats enter the MUX CWL..CWL+BL-1 cycles after the WR
  always_comb begin
    int unsigned beat;
    beat    = (k >= 8'(CWL)) ? int'(k) - CWL : 0;
    if (beat >= BL) beat = BL - 1;
    wdata_o = (op == OP_RMW) ? rbuf[beat] : pattern(op_pat, op_addr, beat, op_bg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ost <= O_IDLE;
      k   <= '0;
      op_done <= 1'b0;
      res_ce <= 1'b0; res_ue <= 1'b0; res_mis <= 1'b0; res_lanes <= '0;
      for (int b = 0; b < BL; b++) rbuf[b] <= '0;
    end else begin
      op_done <= 1'b0;
      k <= (k == '1) ? k : k + 1;
      unique case (ost)
        O_IDLE: if (op_start) begin
          k <= '0;
          res_ce <= 1'b0; res_ue <= 1'b0; res_mis <= 1'b0; res_lanes <= '0;
          ost <= (op == OP_REF) ? O_PRE : O_ACT;
        end
        O_ACT: if (k == 8'(T_RCD - 1)) begin
          k <= '0;
          ost <= (op == OP_WR) ? O_WR : O_RD;
        end
        O_RD: begin
          if (k >= 8'(RD_LAT) && k < 8'(RD_LAT + BL)) begin
            int unsigned beat;
            beat = int'(k) - RD_LAT;
            rbuf[beat] <= rdata_i;
            if (!rvalid_i) res_ue <= 1'b1;   // a missing beat counts as a failure
            if (ce_i) res_ce <= 1'b1;
            if (ue_i) res_ue <= 1'b1;
            if (rdata_i != pattern(op_pat, op_addr, beat, exp_inv)) res_mis <= 1'b1;
            for (int l = 0; l < N_LANES; l++)
              if (rerr_i[l] != '0) res_lanes[l] <= 1'b1;
          end
          if (k == 8'(RD_LAT + BL - 1)) begin
            k <= '0;
            ost <= (op == OP_RMW) ? O_WR : O_PRE;
          end
        end
        O_WR: if (k == 8'(CWL + BL + T_WR + 3)) begin
          k <= '0;
          ost <= O_PRE;
        end
        O_PRE: if (k == 0) begin
          ost <= O_WAIT;
        end
        O_WAIT: if (k == ((op == OP_REF) ? 8'(T_RFC - 1) : 8'(T_RP - 1))) begin
          ost <= O_IDLE;
          op_done <= 1'b1;
        end
        default: ost <= O_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // task sequencer
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    T_PWRUP, T_IDLE, T_BIST, T_SCRUB, T_REBUILD, T_REPAIR, T_PCWAIT, T_PCUP, T_REF,
    T_C1, T_C1W
  } tst_e;

  tst_e       tst;
  logic       hold;          // controller holds the stack (power-up)
  logic       c1_run;        // a die is being conditioned: keep the stack
  logic       op_pend;       // an operation is set up and waits for a grant
  logic       in_op;         // issued operation not yet finished
  baddr_t     bist_addr, scrub_addr, rb_addr;
  logic [1:0] bist_elem;
  logic       zeroize_run;
  logic [3:0] rep;
  logic [3:0] rb_lane;
  lane_mask_t cycled;
  logic [31:0] ref_tmr, scrub_tmr;
  logic [7:0] pc_wait;
  logic       bist_req, rb_req, c1_req;

  wire may_start = (grant_i || hold) && dies_ready_i;
  assign op_start = op_pend && may_start && ost == O_IDLE;
  assign maint_req_o = hold || c1_run || op_start || (ost != O_IDLE);

  wire [31:0] refi_eff = hot_i ? {17'd0, refi_i[15:1]} : {16'd0, refi_i};
  wire        ref_due  = ref_tmr >= refi_eff;
  wire        long_hold = hold || host_idle_i;

  // BIST element table. Modes: 0 zeroize (up w), 1 pattern (up w, up r),
  // 2 March X (up w0, up r0 w1, down r1 w0, up r0).
  // elem_info = {has_r, has_w_after_r, r_inv, w_inv, down}
  logic [1:0] bist_mode;
  op_e        resume_op;
  function automatic logic [4:0] elem_info(logic [1:0] e, logic [1:0] m);
    if (m == 2'd2) begin
      unique case (e)
        2'd0: return 5'b00000;
        2'd1: return 5'b11010;
        2'd2: return 5'b11101;
        default: return 5'b10000;
      endcase
    end
    return (e == 2'd0) ? 5'b00000 : 5'b10000;
  endfunction
  function automatic logic [1:0] elem_last(logic [1:0] m);
    return (m == 2'd2) ? 2'd3 : (m == 2'd1) ? 2'd1 : 2'd0;
  endfunction

  lane_mask_t repair_req;
  lane_mask_t stuck_flag;
  logic [7:0] stuck_ev [N_LANES];
  assign repair_req = autorepair_i ? (sefi_i | anomaly_i | stuck_flag) : '0;

  function automatic logic [3:0] first_lane(lane_mask_t m);
    for (int l = 0; l < N_LANES; l++) if (m[l]) return 4'(l);
    return 4'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst <= T_PWRUP; hold <= 1'b1; c1_run <= 1'b0; op_pend <= 1'b0; in_op <= 1'b0;
      op <= OP_RD; op_addr <= '0; op_bg <= 1'b0; op_pat <= PAT_ZERO; op_wlanes <= '1;
      exp_inv <= 1'b0;
      bist_addr <= '0; scrub_addr <= '0; rb_addr <= '0;
      bist_elem <= '0; zeroize_run <= 1'b0; bist_mode <= '0; resume_op <= OP_WR;
      rep <= '0; rb_lane <= '0; cycled <= '0; stuck_flag <= '0;
      for (int l = 0; l < N_LANES; l++) stuck_ev[l] <= '0;
      ref_tmr <= '0; scrub_tmr <= '0; pc_wait <= '0;
      bist_req <= 1'b0; rb_req <= 1'b0; c1_req <= 1'b0;
      c1_o <= '0; pcycle_o <= '0; spare_o <= '0; log_clear_o <= '0;
      pwrup_done_o <= 1'b0; bist_busy_o <= 1'b0; bist_fail_o <= 1'b0;
      bist_lane_fail_o <= '0; rebuild_busy_o <= 1'b0; rebuild_cnt_o <= '0;
      scrub_cnt_o <= '0; scrub_fix_o <= '0; stuck_cnt_o <= '0; ref_cnt_o <= '0;
      repair_cnt_o <= '0;
    end else begin
      c1_o <= '0; pcycle_o <= '0; spare_o <= '0; log_clear_o <= '0;
      ref_tmr   <= (host_ref_i || (op_start && op == OP_REF)) ? '0 :
                   (ref_tmr == '1 ? ref_tmr : ref_tmr + 1);
      scrub_tmr <= (scrub_tmr == '1) ? scrub_tmr : scrub_tmr + 1;
      if (op_start) begin op_pend <= 1'b0; in_op <= 1'b1; end
      if (op_done && op == OP_REF) ref_cnt_o <= ref_cnt_o + 1;
      // start requests are one-cycle pulses: keep them until served
      if (bist_start_i)    bist_req <= 1'b1;
      if (rebuild_start_i) rb_req   <= 1'b1;
      if (c1_start_i)      c1_req   <= 1'b1;

      unique case (tst)
        T_PWRUP: if (dies_ready_i && !in_op) begin
          if (zeroize_i) begin
            tst <= T_BIST; zeroize_run <= 1'b1; bist_busy_o <= 1'b1;
            bist_elem <= '0; bist_addr <= '0; bist_mode <= 2'd0; exp_inv <= 1'b0;
            op <= OP_WR; op_pat <= PAT_ZERO; op_bg <= 1'b0; op_addr <= '0; op_pend <= 1'b1;
          end else begin
            tst <= T_IDLE; hold <= 1'b0; pwrup_done_o <= 1'b1;
          end
        end

        T_IDLE: if (!in_op && !op_pend) begin
          if (bist_req) begin
            bist_req <= 1'b0;
            tst <= T_BIST; zeroize_run <= 1'b0; bist_busy_o <= 1'b1;
            bist_fail_o <= 1'b0; bist_lane_fail_o <= '0;
            bist_elem <= '0; bist_addr <= '0; exp_inv <= 1'b0;
            bist_mode <= (bist_pat_i == PAT_MARCHX) ? 2'd2 : 2'd1;
            op <= OP_WR; op_pat <= (bist_pat_i == PAT_MARCHX) ? PAT_ZERO : bist_pat_i;
            op_bg <= 1'b0; op_addr <= '0; op_pend <= 1'b1;
          end else if (repair_req != '0) begin
            tst <= T_REPAIR; rb_lane <= first_lane(repair_req);
          end else if (rb_req) begin
            rb_req <= 1'b0;
            tst <= T_REBUILD; rb_lane <= lane_sel_i; rb_addr <= '0; rebuild_busy_o <= 1'b1;
            op <= OP_RMW; op_addr <= '0; op_wlanes <= lane_mask_t'(1) << lane_sel_i; op_pend <= 1'b1;
          end else if (c1_req && long_hold) begin
            c1_req <= 1'b0; c1_run <= 1'b1; pc_wait <= '1; tst <= T_C1;
            c1_o <= lane_mask_t'(1) << lane_sel_i;
          end else if (ref_due && long_hold) begin
            tst <= T_REF; op <= OP_REF; op_pend <= 1'b1;
          end else if (scrub_en_i && scrub_tmr >= {16'd0, scrub_int_i}) begin
            tst <= T_SCRUB; rep <= '0; scrub_tmr <= '0;
            op <= OP_RD; op_pat <= PAT_ZERO; op_addr <= scrub_addr; op_pend <= 1'b1;
          end
        end

        T_REF: if (op_done) begin
          in_op <= 1'b0; tst <= T_IDLE;
        end

        // ---------------- BIST / zeroize ----------------
        T_BIST: if (op_done) begin
          logic [4:0] ei, ein;  // not every field is needed here
          logic       last_addr;
          op_e        nx;
          logic       fin;
          in_op <= 1'b0;
          fin = 1'b0;
          nx  = OP_WR;
          ei  = elem_info(bist_elem, bist_mode);
          if (op == OP_RD) begin
            if (res_mis || res_ue) bist_fail_o <= 1'b1;
            bist_lane_fail_o <= bist_lane_fail_o | res_lanes;
          end
          if (op == OP_REF) begin
            nx = resume_op;                          // continue where we were
          end else if (op == OP_RD && ei[3]) begin
            nx = OP_WR;                              // write of a (r, w) element
          end else begin
            last_addr = ei[0] ? (bist_addr == '0) : (bist_addr == ADDR_LAST);
            if (!last_addr) begin
              bist_addr <= ei[0] ? bist_addr - 1 : bist_addr + 1;
              op_addr   <= ei[0] ? bist_addr - 1 : bist_addr + 1;
              nx = ei[4] ? OP_RD : OP_WR;
            end else if (bist_elem == elem_last(bist_mode)) begin
              fin = 1'b1;
            end else begin
              ein = elem_info(bist_elem + 1, bist_mode);
              bist_elem <= bist_elem + 1;
              bist_addr <= ein[0] ? ADDR_LAST : '0;
              op_addr   <= ein[0] ? ADDR_LAST : '0;
              exp_inv   <= ein[2];
              op_bg     <= ein[1];
              nx = ein[4] ? OP_RD : OP_WR;
            end
          end
          if (fin) begin
            bist_busy_o <= 1'b0;
            if (zeroize_run) begin
              zeroize_run <= 1'b0; hold <= 1'b0; pwrup_done_o <= 1'b1;
            end
            tst <= T_IDLE;
          end else if (op != OP_REF && ref_due && long_hold) begin
            op <= OP_REF; resume_op <= nx; op_pend <= 1'b1;   // slip a refresh in
          end else begin
            op <= nx; op_pend <= 1'b1;
          end
        end

        // ---------------- scrub ----------------
        T_SCRUB: if (op_done) begin
          in_op <= 1'b0;
          if (op == OP_RD && res_ce && rep < max_rep_i) begin
            op <= OP_RMW; op_wlanes <= '1; op_pend <= 1'b1; rep <= rep + 1;
            scrub_fix_o <= scrub_fix_o + 1;
          end else if (op == OP_RMW) begin
            op <= OP_RD; op_pend <= 1'b1;           // re-read after repair
          end else begin
            if (res_ce) begin
              stuck_cnt_o <= stuck_cnt_o + 1;
              for (int l = 0; l < N_LANES; l++)
                if (res_lanes[l]) begin
                  if (stuck_ev[l] != '1) stuck_ev[l] <= stuck_ev[l] + 1;
                  if (32'(stuck_ev[l]) + 1 >= STUCK_LIM) stuck_flag[l] <= 1'b1;
                end
            end
            scrub_addr  <= scrub_addr + 1;
            scrub_cnt_o <= scrub_cnt_o + 1;
            tst <= T_IDLE;
          end
        end

        // ---------------- rebuild ----------------
        T_REBUILD: if (op_done) begin
          in_op <= 1'b0;
          if (rb_addr == ADDR_LAST) begin
            rebuild_busy_o <= 1'b0; rebuild_cnt_o <= rebuild_cnt_o + 1;
            log_clear_o <= lane_mask_t'(1) << rb_lane;
            tst <= T_IDLE;
          end else begin
            rb_addr <= rb_addr + 1; op_addr <= rb_addr + 1; op_pend <= 1'b1;
          end
        end

        // ---------------- SEFI / current anomaly repair ----------------
        T_REPAIR: begin
          repair_cnt_o <= repair_cnt_o + 1;
          log_clear_o  <= lane_mask_t'(1) << rb_lane;
          if (cycled[rb_lane]) spare_o  <= lane_mask_t'(1) << rb_lane;
          else                 pcycle_o <= lane_mask_t'(1) << rb_lane;
          cycled[rb_lane] <= 1'b1;
          stuck_flag[rb_lane] <= 1'b0;
          stuck_ev[rb_lane]   <= '0;
          pc_wait <= '1;
          tst <= T_PCWAIT;
        end
        T_PCWAIT: begin  // give the die manager time to drop the die
          pc_wait <= pc_wait - 1;
          if (pc_wait == 0 || !dies_ready_i) tst <= T_PCUP;
        end
        T_PCUP: if (dies_ready_i) begin
          tst <= T_REBUILD; rb_addr <= '0; rebuild_busy_o <= 1'b1;
          op <= OP_RMW; op_addr <= '0; op_wlanes <= lane_mask_t'(1) << rb_lane; op_pend <= 1'b1;
        end

        // ---------------- C1 conditioning ----------------
        T_C1: begin      // wait until the PHY takes the request
          pc_wait <= pc_wait - 1;
          if (pc_wait == 0 || !dies_ready_i) tst <= T_C1W;
        end
        T_C1W: if (dies_ready_i) begin
          c1_run <= 1'b0; tst <= T_IDLE;
        end

        default: tst <= T_IDLE;
      endcase
      // errors of a lane being power-cycled or rebuilt are expected: keep its
      // log and current flag cleared until the rebuild is over
      if (tst inside {T_REPAIR, T_PCWAIT, T_PCUP} || (tst == T_REBUILD && !(op_done && rb_addr == ADDR_LAST)))
        log_clear_o <= lane_mask_t'(1) << rb_lane;
    end
  end

  // an operation is never started while another runs
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) op_start |-> ost == O_IDLE);
endmodule
