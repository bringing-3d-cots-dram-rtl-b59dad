// tb_spi_port: SPI mode-0 frames from a testbench master (SCLK = clk/8):
// read the ID, read reset values, write configuration registers and read
// them back, see the self-clearing start pulses, read status inputs and a
// lane error counter.
module tb_spi_port;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic scrub_en, spiral_en, cs_mode, idle_req, bist_start, rebuild_start, c1_start, log_clear;
  logic spare_en, autorepair;
  logic [2:0] width; bist_pat_e pat; logic [3:0] lane, max_rep, persist;
  logic [15:0] scrub_int, refi, thr; logic [31:0] win; logic [11:0] ext, opl, marg;
  die_mask_t off;
  logic [15:0] lane_err [N_LANES];
  int checks = 0, failures = 0;
  int n_bist = 0;

  spi_port dut (.clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .scrub_en_o(scrub_en), .spiral_en_o(spiral_en), .cs_mode_o(cs_mode), .idle_req_o(idle_req),
    .bist_start_o(bist_start), .rebuild_start_o(rebuild_start), .c1_start_o(c1_start),
    .log_clear_o(log_clear), .spare_en_o(spare_en), .autorepair_o(autorepair),
    .host_width_o(width), .bist_pat_o(pat), .lane_o(lane), .scrub_int_o(scrub_int),
    .refi_o(refi), .sefi_thresh_o(thr), .sefi_window_o(win), .ext_o(ext), .op_len_o(opl),
    .cur_margin_o(marg), .die_off_o(off), .max_rep_o(max_rep), .persist_o(persist),
    .status_i(16'hBEEF), .temp_i(16'd42), .sefi_i(13'h0021), .anomaly_i(14'h0004),
    .ce_cnt_i(16'd7), .ue_cnt_i(16'd1), .stuck_i(16'd2), .scrub_cnt_i(16'd300),
    .rebuild_cnt_i(16'd1), .ref_cnt_i(16'd9), .bist_lanes_i(13'h0100), .repair_cnt_i(16'd3),
    .windows_i(16'd5), .scrub_fix_i(16'd4), .ce_hi_i(16'd0), .ue_hi_i(16'd0),
    .lane_err_i(lane_err));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && bist_start) n_bist++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic spi_xfer(input logic wr, input logic [6:0] a, input logic [15:0] wd,
                          output logic [15:0] rd);
    logic [23:0] frame;
    frame = {wr, a, wd};
    rd = '0;
    cs_n = 0; repeat (8) @(posedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = frame[i];
      repeat (4) @(posedge clk); sclk = 1;
      if (i < 16) rd = {rd[14:0], miso};
      repeat (4) @(posedge clk); sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (8) @(posedge clk);
  endtask

  initial begin
    logic [15:0] v;
    for (int l = 0; l < N_LANES; l++) lane_err[l] = 16'(l * 3 + 1);
    repeat (3) @(posedge clk); rst_n = 1;
    spi_xfer(0, 7'h00, 0, v); chk(v == 16'h3D13, "id");
    spi_xfer(0, 7'h04, 0, v); chk(v == 16'd2340, "refi reset");
    chk(scrub_en && spiral_en && autorepair && !idle_req, "ctrl reset");
    spi_xfer(1, 7'h04, 16'd1170, v); chk(refi == 16'd1170, "refi write");
    spi_xfer(0, 7'h04, 0, v); chk(v == 16'd1170, "refi readback");
    spi_xfer(1, 7'h02, 16'h0543, v);
    chk(width == 3'd3 && pat == PAT_MARCHX && lane == 4'd5, "r02 fields");
    spi_xfer(1, 7'h01, 16'h0318, v);               // idle + bist start + spare + autorepair
    chk(idle_req && !scrub_en && spare_en && autorepair, "ctrl write");
    chk(n_bist == 1 && !bist_start, "bist pulse once");
    spi_xfer(0, 7'h01, 0, v); chk(v == 16'h0308, "pulse bits not stored");
    spi_xfer(0, 7'h10, 0, v); chk(v == 16'hBEEF, "status");
    spi_xfer(0, 7'h11, 0, v); chk(v == 16'd42, "temperature");
    spi_xfer(0, 7'h12, 0, v); chk(v == 16'h0021, "sefi lanes");
    spi_xfer(0, 7'h25, 0, v); chk(v == 16'd16, "lane 5 errors");
    spi_xfer(1, 7'h06, 16'h0010, v); chk(win == 32'h1000, "window scaling");
    spi_xfer(1, 7'h0A, 16'h2001, v); chk(off == 14'h2001, "die off mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
