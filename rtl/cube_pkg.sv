// cube_pkg: types and constants shared by the memory-cube controller.
//
// The stack holds fourteen x16 DDR3 dies: eight carry the data word, five the
// SEC-DED check bits and one is a cold spare. One 128-bit host beat is spread
// over the eight data dies as sixteen byte "rows": bit k of byte r lives on
// DQ line r of data die k, and the five check bits of byte r live on DQ line r
// of the five ECC dies. The die counts, x16 dies, 128-bit word and (13,8)
// code follow the architecture; the DDR3 timing numbers below are ordinary
// DDR3 values at the 300 MHz fabric clock and are this design's choice.
//
// Commands are carried inside the controller as an enum and converted to the
// DDR3 pin encoding (CS#, RAS#, CAS#, WE#) only at the host port and the die
// PHYs. One fabric cycle carries one beat per die (the double-data-rate
// serialisation belongs to the electrical PHY, which is not modelled).
package cube_pkg;

  // ---- stack organisation ----
  localparam int unsigned N_DIES    = 14;        // physical dies in the cube
  localparam int unsigned N_DATA    = 8;         // data dies
  localparam int unsigned N_ECC     = 5;         // ECC dies
  localparam int unsigned N_LANES   = N_DATA + N_ECC;  // 13 logical lanes
  localparam int unsigned SPARE_DIE = 13;        // physical index of the spare
  localparam int unsigned DQ_W      = 16;        // x16 dies
  localparam int unsigned ROWS      = DQ_W;      // 16 byte rows per beat
  localparam int unsigned WORD_W    = N_DATA * ROWS;   // 128-bit data word

  // ---- DDR3 die addressing (8 Gb x16) ----
  localparam int unsigned BA_W   = 3;
  localparam int unsigned ADDR_W = 16;           // A0..A15
  localparam int unsigned BL     = 8;            // burst length in beats

  typedef logic [DQ_W-1:0]   dq_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [N_LANES-1:0] lane_mask_t;
  typedef logic [N_DIES-1:0]  die_mask_t;

  // ---- commands ----
  typedef enum logic [3:0] {
    CMD_DES  = 4'd0,   // deselect (CS# high)
    CMD_NOP  = 4'd1,
    CMD_ACT  = 4'd2,
    CMD_RD   = 4'd3,
    CMD_WR   = 4'd4,
    CMD_PRE  = 4'd5,   // single-bank precharge (A10 low)
    CMD_PREA = 4'd6,   // precharge all (A10 high)
    CMD_REF  = 4'd7,
    CMD_ZQCL = 4'd8,
    CMD_MRS  = 4'd9,
    CMD_SRE  = 4'd10   // self-refresh entry (REF with CKE low)
  } cmd_e;

  typedef struct packed {
    cmd_e              cmd;
    logic [BA_W-1:0]   ba;
    logic [ADDR_W-1:0] addr;
  } ddr_cmd_t;

  localparam ddr_cmd_t CMD_IDLE = '{cmd: CMD_NOP, ba: '0, addr: '0};

  // DDR3 pin encoding {cs_n, ras_n, cas_n, we_n}
  typedef struct packed {
    logic cs_n;
    logic ras_n;
    logic cas_n;
    logic we_n;
  } ddr_pins_t;

  function automatic ddr_pins_t cmd_to_pins(cmd_e c);
    unique case (c)
      CMD_DES:  return 4'b1111;
      CMD_NOP:  return 4'b0111;
      CMD_ACT:  return 4'b0011;
      CMD_RD:   return 4'b0101;
      CMD_WR:   return 4'b0100;
      CMD_PRE,
      CMD_PREA: return 4'b0010;
      CMD_REF,
      CMD_SRE:  return 4'b0001;
      CMD_ZQCL: return 4'b0110;
      CMD_MRS:  return 4'b0000;
      default:  return 4'b0111;
    endcase
  endfunction

  function automatic cmd_e pins_to_cmd(ddr_pins_t p, logic a10, logic cke);
    if (p.cs_n) return CMD_DES;
    unique case ({p.ras_n, p.cas_n, p.we_n})
      3'b111:  return CMD_NOP;
      3'b011:  return CMD_ACT;
      3'b101:  return CMD_RD;
      3'b100:  return CMD_WR;
      3'b010:  return a10 ? CMD_PREA : CMD_PRE;
      3'b001:  return cke ? CMD_REF : CMD_SRE;
      3'b110:  return CMD_ZQCL;
      default: return CMD_MRS;
    endcase
  endfunction

  // ---- Hsiao (13,8) SEC-DED code ----
  // Columns of the parity-check matrix for the eight data bits: eight distinct
  // weight-3 columns out of the ten possible in five rows. The five check-bit
  // columns are the unit vectors. All columns odd weight, so a double error
  // gives a non-zero, even-weight syndrome.
  localparam logic [4:0] HSIAO_COL [N_DATA] = '{
    5'b00111, 5'b01011, 5'b01101, 5'b01110,
    5'b10011, 5'b10101, 5'b10110, 5'b11001
  };

  function automatic logic [N_ECC-1:0] hsiao_check(logic [N_DATA-1:0] d);
    logic [N_ECC-1:0] c;
    c = '0;
    for (int k = 0; k < N_DATA; k++)
      if (d[k]) c ^= HSIAO_COL[k];
    return c;
  endfunction

  // ---- operating mode (values as printed in the controller simulation) ----
  typedef enum logic [2:0] {
    MODE_NORMAL = 3'b001,   // host pass-through
    MODE_MAINT  = 3'b010    // controller owns the stack
  } mode_e;

  // ---- BIST patterns ----
  typedef enum logic [2:0] {
    PAT_ZERO    = 3'd0,
    PAT_ONES    = 3'd1,
    PAT_CHECKER = 3'd2,
    PAT_ADDR    = 3'd3,
    PAT_MARCHX  = 3'd4,
    PAT_DIE_OFS = 3'd5     // address pattern, data die k offset by k
  } bist_pat_e;

endpackage
