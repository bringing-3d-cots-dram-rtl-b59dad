// host_port: digital side of the host DDR3 interface.
//
// Registers the host command pins (one cycle) and decodes them into a
// command; registers the host write data and masks it to the programmed host
// width; masks the read data on the way out. The width code is
// 0:x8 1:x16 2:x32 3:x64 4:x128; a narrower host uses the low bytes of the
// 128-bit word (the low byte rows, i.e. the low DQ lines of every die), and
// the unused bits are written as zero, so the ECC stays consistent.
// CKE low with a refresh encoding is self-refresh entry; any other command
// seen while CKE is low becomes a deselect, so the dies stay in self-refresh
// until the host raises CKE and sends a NOP.
// Programmable width x8..x128 with x128 as the baseline follows the
// architecture; which bits a narrow host uses is this design's choice. The
// electrical host PHY (IO, DLL, DQS) is outside this block.
module host_port
  import cube_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        width_i,
  // host pins
  input  logic              cke_i,
  input  logic              cs_n_i,
  input  logic              ras_n_i,
  input  logic              cas_n_i,
  input  logic              we_n_i,
  input  logic [BA_W-1:0]   ba_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  word_t             wdata_i,
  output word_t             rdata_o,
  output logic              rvalid_o,
  // core side
  output ddr_cmd_t          cmd_o,
  output word_t             wdata_o,
  input  word_t             rdata_i,
  input  logic              rvalid_i
);
  word_t mask;

  always_comb begin
    unique case (width_i)
      3'd0:    mask = word_t'({8{1'b1}});
      3'd1:    mask = word_t'({16{1'b1}});
      3'd2:    mask = word_t'({32{1'b1}});
      3'd3:    mask = word_t'({64{1'b1}});
      default: mask = '1;
    endcase
    rdata_o  = rdata_i & mask;
    rvalid_o = rvalid_i;
  end

  cmd_e pin_cmd;
  assign pin_cmd = pins_to_cmd('{cs_n_i, ras_n_i, cas_n_i, we_n_i}, addr_i[10], cke_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_o   <= CMD_IDLE;
      wdata_o <= '0;
    end else begin
      cmd_o.cmd  <= (cke_i || pin_cmd == CMD_SRE) ? pin_cmd : CMD_DES;
      cmd_o.ba   <= ba_i;
      cmd_o.addr <= addr_i;
      wdata_o    <= wdata_i & mask;
    end
  end
endmodule
