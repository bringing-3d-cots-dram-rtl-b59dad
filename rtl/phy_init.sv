// phy_init: DDR3 power-up initialisation of one die, re-triggerable as the
// "C1" software-conditioning procedure.
//
// Full initialisation (start_i): RESET# low for T_RST cycles, CKE low for
// T_CKE cycles, CKE high and wait T_XPR, then the four mode registers in the
// order MR2, MR3, MR1, MR0 (MR0 with DLL reset) spaced T_MRD apart, T_MOD,
// then ZQCL and T_ZQINIT. done_o rises when the sequence ends.
// Conditioning (c1_i, only once done): the same mode-register rewrite with
// DLL reset followed by ZQ calibration, skipping reset, CKE and every
// calibration that belongs to power-up only. This is the non-destructive
// procedure used to clear functional interrupts of a die without touching
// its data (the refresh keeps running from the controller).
// The C1 content (MRS rewrite, DLL reset, ZQ calibration) and its re-use of the
// init block follow the architecture; the timings and mode-register values are
// ordinary DDR3 values derived from CL/CWL and are this design's.
// Outputs are combinational from the state and counter (ddr_phy registers them).
module phy_init
  import cube_pkg::*;
#(
  parameter int unsigned CL       = 7,
  parameter int unsigned CWL      = 6,
  parameter int unsigned T_RST    = 60000,   // 200 us at 300 MHz
  parameter int unsigned T_CKE    = 150000,  // 500 us at 300 MHz
  parameter int unsigned T_XPR    = 110,
  parameter int unsigned T_MRD    = 4,
  parameter int unsigned T_MOD    = 12,
  parameter int unsigned T_ZQINIT = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start_i,     // full power-up initialisation
  input  logic     c1_i,        // software conditioning
  output ddr_cmd_t cmd_o,
  output logic     reset_n_o,
  output logic     cke_o,
  output logic     busy_o,
  output logic     done_o
);
  // MR0: BL8, CL field A6:A4 = CL-4, WR = 8 (A11:A9 = 100), DLL reset A8
  localparam logic [ADDR_W-1:0] MR0 = ADDR_W'((4 << 9) | (1 << 8) | ((CL - 4) << 4));
  localparam logic [ADDR_W-1:0] MR1 = '0;                       // DLL enable, AL 0
  localparam logic [ADDR_W-1:0] MR2 = ADDR_W'((CWL - 5) << 3);  // CWL
  localparam logic [ADDR_W-1:0] MR3 = '0;

  typedef enum logic [3:0] {
    S_OFF, S_RST, S_CKE, S_XPR, S_MR2, S_MR3, S_MR1, S_MR0, S_MOD, S_ZQ, S_ZQW, S_DONE
  } state_e;

  state_e      st;
  logic [17:0] tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_OFF;
      tmr    <= '0;
      done_o <= 1'b0;
    end else if (start_i) begin
      st     <= S_RST;
      tmr    <= 18'(T_RST - 1);
      done_o <= 1'b0;
    end else if (c1_i && st == S_DONE) begin
      st  <= S_MR2;
      tmr <= 18'(T_MRD - 1);
    end else if (tmr != 0) begin
      tmr <= tmr - 1;
    end else begin
      unique case (st)
        S_RST: begin st <= S_CKE; tmr <= 18'(T_CKE - 1);    end
        S_CKE: begin st <= S_XPR; tmr <= 18'(T_XPR - 1);    end
        S_XPR: begin st <= S_MR2; tmr <= 18'(T_MRD - 1);    end
        S_MR2: begin st <= S_MR3; tmr <= 18'(T_MRD - 1);    end
        S_MR3: begin st <= S_MR1; tmr <= 18'(T_MRD - 1);    end
        S_MR1: begin st <= S_MR0; tmr <= 18'(T_MRD - 1);    end
        S_MR0: begin st <= S_MOD; tmr <= 18'(T_MOD - 1);    end
        S_MOD: begin st <= S_ZQ;  tmr <= '0;                end
        S_ZQ:  begin st <= S_ZQW; tmr <= 18'(T_ZQINIT - 1); end
        S_ZQW: begin st <= S_DONE; done_o <= 1'b1;          end
        default: ;
      endcase
    end
  end

  // a mode register / ZQ command is issued in the first cycle of its state;
  // every issuing state is entered from a different state
  state_e st_q;
  logic   first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= S_OFF;
    else        st_q <= st;
  end
  assign first = (st != st_q);

  always_comb begin
    cmd_o     = CMD_IDLE;
    reset_n_o = !(st inside {S_OFF, S_RST});
    cke_o     = !(st inside {S_OFF, S_RST, S_CKE});
    busy_o    = (st != S_DONE);
    if (first) begin
      unique case (st)
        S_MR2: cmd_o = '{cmd: CMD_MRS, ba: 3'd2, addr: MR2};
        S_MR3: cmd_o = '{cmd: CMD_MRS, ba: 3'd3, addr: MR3};
        S_MR1: cmd_o = '{cmd: CMD_MRS, ba: 3'd1, addr: MR1};
        S_MR0: cmd_o = '{cmd: CMD_MRS, ba: 3'd0, addr: MR0};
        S_ZQ:  cmd_o = '{cmd: CMD_ZQCL, ba: '0, addr: ADDR_W'(1 << 10)};
        default: ;
      endcase
    end
  end
endmodule
