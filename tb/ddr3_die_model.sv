// ddr3_die_model: behavioural model of one x16 DDR3 die for simulation
// (not synthesizable; stands in for the commercial DRAM die).
//
// Command level only: it samples the command pins at each rising edge,
// keeps the open row of each bank, stores data sparsely (associative array,
// so a full 8 Gb address space costs nothing) and returns read beat i for the
// controller's capture edge e+CL+i (e = edge that sampled the RD); write beat
// i is taken at edge e+CWL+i. It counts protocol errors (RD/WR to a closed
// bank, ACT to an open bank, ACT-to-RD/WR closer than T_RCD, commands while
// in reset or with CKE low) and the MRS/ZQCL/REF/PREA commands it receives.
// Fault hooks for testbenches: flip a stored bit, make a bit stuck, make the
// whole die fail (reads return inverted data, a functional interrupt) until
// it is reset. Dropping RESET# erases the contents. Like a real die after
// power-on, it ignores its pins until RESET# has been low once.
module ddr3_die_model
  import cube_pkg::*;
#(
  parameter int unsigned CL    = 7,
  parameter int unsigned CWL   = 6,
  parameter int unsigned T_RCD = 6
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              cke,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BA_W-1:0]   ba,
  input  logic [ADDR_W-1:0] addr,
  input  dq_t               dq_i,    // from the controller
  input  logic              dq_oe,
  output dq_t               dq_o     // to the controller
);
  typedef longint unsigned key_t;
  dq_t  mem [key_t];
  logic [ADDR_W-1:0] open_row [8];
  logic [7:0]        is_open;
  int unsigned       act_time [8];
  longint unsigned   cyc;
  key_t              rd_key [64];
  logic [63:0]       rd_v;
  key_t              wr_key [64];
  logic [63:0]       wr_v;

  int unsigned proto_err, n_mrs, n_zq, n_ref, n_prea, n_act, n_rd, n_wr;
  logic        sefi;
  logic        powered_up;   // RESET# has been low once: pins are meaningful
  key_t        stuck_key;
  int          stuck_bit;     // -1: none
  logic        stuck_val;
  logic [BA_W-1:0] last_act_ba;

  function automatic key_t mkkey(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [9:0] c);
    return {35'd0, b, r, c};
  endfunction

  function automatic dq_t rd_word(key_t k);
    dq_t v;
    v = mem.exists(k) ? mem[k] : '0;
    if (stuck_bit >= 0 && k == stuck_key) v[stuck_bit] = stuck_val;
    return sefi ? ~v : v;
  endfunction

  // ---- test hooks ----
  function automatic void flip(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [9:0] c, int bitn);
    key_t k;
    k = mkkey(b, r, c);
    mem[k] = (mem.exists(k) ? mem[k] : '0) ^ dq_t'(1 << bitn);
  endfunction
  function automatic void set_stuck(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [9:0] c, int bitn, logic v);
    stuck_key = mkkey(b, r, c); stuck_bit = bitn; stuck_val = v;
  endfunction
  function automatic void clr_stuck(); stuck_bit = -1; endfunction
  function automatic void set_sefi(logic v); sefi = v; endfunction
  function automatic dq_t peek(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [9:0] c);
    key_t k;
    k = mkkey(b, r, c);
    return mem.exists(k) ? mem[k] : '0;
  endfunction

  initial begin
    proto_err = 0; n_mrs = 0; n_zq = 0; n_ref = 0; n_prea = 0; n_act = 0; n_rd = 0; n_wr = 0;
    sefi = 1'b0; stuck_bit = -1; stuck_val = 1'b0; stuck_key = 0;
    powered_up = 1'b0;
    is_open = '0; cyc = 0; rd_v = '0; wr_v = '0; dq_o = '0; last_act_ba = '0;
    for (int i = 0; i < 8; i++) begin open_row[i] = '0; act_time[i] = 0; end
    for (int i = 0; i < 64; i++) begin rd_key[i] = 0; wr_key[i] = 0; end
  end

  always @(posedge clk) begin
    int unsigned slot;
    cyc <= cyc + 1;
    slot = int'(cyc % 64);
    // data movement scheduled for this edge
    if (wr_v[slot]) begin
      if (dq_oe) mem[wr_key[slot]] = dq_i;
      else       proto_err++;
      wr_v[slot] = 1'b0;
    end
    if (rd_v[slot]) begin
      dq_o <= rd_word(rd_key[slot]);
      rd_v[slot] = 1'b0;
    end else begin
      dq_o <= '0;
    end
    if (!reset_n) powered_up = 1'b1;
    if (!reset_n || !powered_up) begin
      mem.delete();
      is_open = '0;
      sefi = 1'b0;
      rd_v = '0; wr_v = '0;
    end else if (!cs_n && cke) begin
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACT
          if (is_open[ba]) proto_err++;
          is_open[ba] = 1'b1; open_row[ba] = addr; act_time[ba] = int'(cyc);
          last_act_ba = ba; n_act++;
        end
        3'b101, 3'b100: begin  // RD / WR
          if (!is_open[ba] || int'(cyc) - int'(act_time[ba]) < int'(T_RCD)) proto_err++;
          for (int i = 0; i < BL; i++) begin
            key_t k;
            k = mkkey(ba, open_row[ba], 10'(addr[9:0] + i));
            if (we_n) begin
              rd_key[6'(slot + CL + i - 1)] = k; rd_v[6'(slot + CL + i - 1)] = 1'b1;
            end else begin
              wr_key[6'(slot + CWL + i)] = k; wr_v[6'(slot + CWL + i)] = 1'b1;
            end
          end
          if (we_n) n_rd++; else n_wr++;
        end
        3'b010: begin  // PRE / PREA
          if (addr[10]) begin is_open = '0; n_prea++; end
          else is_open[ba] = 1'b0;
        end
        3'b001: begin if (is_open != '0) proto_err++; n_ref++; end
        3'b110: n_zq++;
        3'b000: n_mrs++;
        default: ;
      endcase
    end else if (!cs_n && !cke && !({ras_n, cas_n, we_n} inside {3'b001, 3'b111})) begin
      proto_err++;
    end
  end
endmodule
