// spi_port: housekeeping and configuration port (SPI slave, mode 0).
//
// Lets the host or a ground system read error statistics, temperature and
// status, configure the controller, start tests and request idle time,
// without using the DDR3 bus. SCLK, CS# and MOSI are synchronised to the
// controller clock (two flops) and edge-detected, so SCLK must be slower than
// clk/4. A frame, MSB first, while CS# is low:
//   byte 0 : {write, addr[6:0]}, then 16 data bits.
// A write stores the 16 bits into register addr at the end of the frame; a
// read shifts register addr out on MISO during the 16 data bits (MISO changes
// after each falling SCLK edge). Bits marked "pulse" clear themselves.
// Register map (16-bit):
//   00 id 0x3D13 (read only)
//   01 control: 0 scrub_en, 1 spiral_en, 2 cs_mode, 3 idle request,
//      4 bist_start (pulse), 5 rebuild_start (pulse), 6 c1_start (pulse),
//      7 clear error log (pulse), 8 spare_en, 9 autorepair
//   02 [2:0] host width, [6:4] BIST pattern, [11:8] lane for rebuild/C1/spare
//   03 scrub interval   04 refresh interval   05 SEFI threshold
//   06 SEFI window / 256   07 idle extension cycles   08 maintenance op length
//   09 current margin   0A die off mask   0B [3:0] scrub repeats, [11:8] persist
//   10 status (read only, status_i)   11 temperature (temp_i)
//   12 SEFI lanes   13 current anomalies   14 CE count   15 UE count
//   16 stuck count   17 scrub count   18 rebuild count   19 refresh count
//   1A BIST failing lanes   1B repair count   1C idle windows opened
//   1D scrub write-backs   1E CE count high   1F UE count high
//   20..2C total bit-error count of lanes 0..12 (low 16 bits)
// The existence of the port and its uses follow the architecture; the frame
// format, register map and reset values are this design's.
module spi_port
  import cube_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spi_sclk,
  input  logic        spi_cs_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  // configuration
  output logic        scrub_en_o,
  output logic        spiral_en_o,
  output logic        cs_mode_o,
  output logic        idle_req_o,
  output logic        bist_start_o,
  output logic        rebuild_start_o,
  output logic        c1_start_o,
  output logic        log_clear_o,
  output logic        spare_en_o,
  output logic        autorepair_o,
  output logic [2:0]  host_width_o,
  output bist_pat_e   bist_pat_o,
  output logic [3:0]  lane_o,
  output logic [15:0] scrub_int_o,
  output logic [15:0] refi_o,
  output logic [15:0] sefi_thresh_o,
  output logic [31:0] sefi_window_o,
  output logic [11:0] ext_o,
  output logic [11:0] op_len_o,
  output logic [11:0] cur_margin_o,
  output die_mask_t   die_off_o,
  output logic [3:0]  max_rep_o,
  output logic [3:0]  persist_o,
  // status
  input  logic [15:0] status_i,
  input  logic [15:0] temp_i,
  input  lane_mask_t  sefi_i,
  input  die_mask_t   anomaly_i,
  input  logic [15:0] ce_cnt_i,
  input  logic [15:0] ue_cnt_i,
  input  logic [15:0] stuck_i,
  input  logic [15:0] scrub_cnt_i,
  input  logic [15:0] rebuild_cnt_i,
  input  logic [15:0] ref_cnt_i,
  input  lane_mask_t  bist_lanes_i,
  input  logic [15:0] repair_cnt_i,
  input  logic [15:0] windows_i,
  input  logic [15:0] scrub_fix_i,
  input  logic [15:0] ce_hi_i,
  input  logic [15:0] ue_hi_i,
  input  logic [15:0] lane_err_i [N_LANES]
);
  logic [2:0]  sclk_s, cs_s;
  logic [1:0]  mosi_s;
  logic [5:0]  bitn;
  logic [7:0]  hdr;
  logic [15:0] sh_in, sh_out;
  logic [15:0] ctrl, r02, r0b;

  wire sclk_rise = sclk_s[1] && !sclk_s[2];
  wire sclk_fall = !sclk_s[1] && sclk_s[2];
  wire cs_act    = !cs_s[1];
  wire cs_end    = cs_s[1] && !cs_s[2];

  function automatic logic [15:0] rd_reg(logic [6:0] a);
    unique case (a)
      7'h00: return 16'h3D13;
      7'h01: return ctrl;
      7'h02: return r02;
      7'h03: return scrub_int_o;
      7'h04: return refi_o;
      7'h05: return sefi_thresh_o;
      7'h06: return sefi_window_o[23:8];
      7'h07: return {4'd0, ext_o};
      7'h08: return {4'd0, op_len_o};
      7'h09: return {4'd0, cur_margin_o};
      7'h0A: return 16'(die_off_o);
      7'h0B: return r0b;
      7'h10: return status_i;
      7'h11: return temp_i;
      7'h12: return 16'(sefi_i);
      7'h13: return 16'(anomaly_i);
      7'h14: return ce_cnt_i;
      7'h15: return ue_cnt_i;
      7'h16: return stuck_i;
      7'h17: return scrub_cnt_i;
      7'h18: return rebuild_cnt_i;
      7'h19: return ref_cnt_i;
      7'h1A: return 16'(bist_lanes_i);
      7'h1B: return repair_cnt_i;
      7'h1C: return windows_i;
      7'h1D: return scrub_fix_i;
      7'h1E: return ce_hi_i;
      7'h1F: return ue_hi_i;
      default: begin
        if (a >= 7'h20 && a < 7'h20 + 7'(N_LANES)) return lane_err_i[4'(a - 7'h20)];
        return 16'h0000;
      end
    endcase
  endfunction

  logic [15:0] rdv;
  assign rdv = rd_reg(hdr[6:0]);

  assign scrub_en_o   = ctrl[0];
  assign spiral_en_o  = ctrl[1];
  assign cs_mode_o    = ctrl[2];
  assign idle_req_o   = ctrl[3];
  assign spare_en_o   = ctrl[8];
  assign autorepair_o = ctrl[9];
  assign host_width_o = r02[2:0];
  assign bist_pat_o   = bist_pat_e'(r02[6:4]);
  assign lane_o       = r02[11:8];
  assign max_rep_o    = r0b[3:0];
  assign persist_o    = r0b[11:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
      bitn <= '0; hdr <= '0; sh_in <= '0; sh_out <= '0; spi_miso <= 1'b0;
      ctrl <= 16'h0203;            // scrub on, spiraling on, autorepair on
      r02  <= 16'h0004;            // x128 host
      r0b  <= 16'h0103;            // 3 scrub repeats, persist 1
      scrub_int_o   <= 16'd3000;
      refi_o        <= 16'd2340;   // 7.8 us at 300 MHz
      sefi_thresh_o <= 16'd64;
      sefi_window_o <= 32'd65536;
      ext_o         <= 12'd80;     // about 270 ns at 300 MHz
      op_len_o      <= 12'd64;
      cur_margin_o  <= 12'd256;
      die_off_o     <= '0;
      bist_start_o <= 1'b0; rebuild_start_o <= 1'b0; c1_start_o <= 1'b0; log_clear_o <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[1:0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
      bist_start_o <= 1'b0; rebuild_start_o <= 1'b0; c1_start_o <= 1'b0; log_clear_o <= 1'b0;
      if (!cs_act) begin
        bitn <= '0;
      end else begin
        if (sclk_rise) begin
          bitn <= bitn + 1;
          if (bitn < 8) hdr   <= {hdr[6:0], mosi_s[1]};
          else          sh_in <= {sh_in[14:0], mosi_s[1]};
        end
        if (sclk_fall) begin
          if (bitn == 8)                 begin sh_out <= {rdv[14:0], 1'b0}; spi_miso <= rdv[15]; end
          else if (bitn > 8)             begin spi_miso <= sh_out[15]; sh_out <= {sh_out[14:0], 1'b0}; end
        end
      end
      if (bitn == 0 && !cs_act) spi_miso <= 1'b0;
      if (cs_end && bitn == 24 && hdr[7]) begin
        unique case (hdr[6:0])
          7'h01: begin
            ctrl            <= sh_in & 16'hFF0F;
            bist_start_o    <= sh_in[4];
            rebuild_start_o <= sh_in[5];
            c1_start_o      <= sh_in[6];
            log_clear_o     <= sh_in[7];
          end
          7'h02: r02           <= sh_in;
          7'h03: scrub_int_o   <= sh_in;
          7'h04: refi_o        <= sh_in;
          7'h05: sefi_thresh_o <= sh_in;
          7'h06: sefi_window_o <= {8'd0, sh_in, 8'd0};
          7'h07: ext_o         <= sh_in[11:0];
          7'h08: op_len_o      <= sh_in[11:0];
          7'h09: cur_margin_o  <= sh_in[11:0];
          7'h0A: die_off_o     <= sh_in[N_DIES-1:0];
          7'h0B: r0b           <= sh_in;
          default: ;
        endcase
      end
    end
  end
endmodule
