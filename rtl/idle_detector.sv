// idle_detector: decides when a maintenance operation may be slipped in
// between host operations without the host noticing.
//
// The host's DDR3 timing is fixed, so the controller can only act where the
// host has promised to stay away. Three sources of such time are recognised:
//  * the Idle pin (synchronised) or the idle request bit written over SPI:
//    the host declares the bus idle for as long as it is held;
//  * a host REF or ZQCL whose busy time the host has lengthened (tRFC or tZQ
//    programmed longer than the dies need): after the dies' real busy time
//    (busy_ref_i / busy_zq_i cycles) a window of ext_i cycles is free;
//  * CE# (chip select) inactive, when cs_mode_i is set: the host has agreed to
//    keep the selected period guard-extended, so an operation started while
//    CS# is high can finish after CS# returns.
// grant_o says an operation of at most op_len_i cycles may start now. The
// control logic holds the MUX until its operation is over.
// The three sources follow the architecture; the counters, their widths and
// the op_len check are this design's. grant_o is registered.
module idle_detector
  import cube_pkg::*;
#(
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cmd_e          host_cmd_i,     // decoded host command (registered)
  input  logic          idle_pin_i,     // asynchronous Idle input
  input  logic          spi_idle_i,     // idle requested over SPI
  input  logic          cs_mode_i,      // allow maintenance while CS# inactive
  input  logic [CW-1:0] busy_ref_i,     // real die tRFC in cycles
  input  logic [CW-1:0] busy_zq_i,      // real die tZQ in cycles
  input  logic [CW-1:0] ext_i,          // host-granted extension in cycles
  input  logic [CW-1:0] op_len_i,       // longest maintenance operation
  output logic          grant_o,
  output logic          host_idle_o,    // Idle pin/port active (long window)
  output logic [31:0]   windows_o       // count of extension windows opened
);
  logic [1:0]    idle_sync;
  logic [CW:0]   cnt;            // cycles left until the host's extended busy ends
  logic          in_win;

  always_comb in_win = (cnt != 0) && (cnt <= {1'b0, ext_i}) && (cnt >= {1'b0, op_len_i});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_sync   <= '0;
      cnt         <= '0;
      grant_o     <= 1'b0;
      host_idle_o <= 1'b0;
      windows_o   <= '0;
    end else begin
      idle_sync   <= {idle_sync[0], idle_pin_i};
      host_idle_o <= idle_sync[1] | spi_idle_i;
      if (host_cmd_i == CMD_REF) begin
        cnt       <= {1'b0, busy_ref_i} + {1'b0, ext_i};
        windows_o <= windows_o + 1;
      end else if (host_cmd_i == CMD_ZQCL) begin
        cnt       <= {1'b0, busy_zq_i} + {1'b0, ext_i};
        windows_o <= windows_o + 1;
      end else if (cnt != 0) begin
        cnt <= cnt - 1;
      end
      grant_o <= idle_sync[1] | spi_idle_i | in_win |
                 (cs_mode_i && host_cmd_i == CMD_DES && cnt == 0);
    end
  end
endmodule
