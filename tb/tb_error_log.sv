// tb_error_log: per-lane bit-error totals, CE/UE beat counts, SEFI flag when
// a lane's errors within one window exceed the threshold, window reset, and
// per-lane clear. Expected values are kept by the testbench.
module tb_error_log;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ce = 0, ue = 0;
  dq_t err [N_LANES];
  logic [15:0] thresh = 16'd10;
  logic [31:0] window = 32'd0;
  lane_mask_t clr = '0;
  logic [31:0] total [N_LANES];
  lane_mask_t sefi;
  logic [31:0] cec, uec;
  int checks = 0, failures = 0;
  int exp_total [N_LANES];

  error_log dut (.clk, .rst_n, .valid_i(valid), .err_i(err), .ce_i(ce), .ue_i(ue),
                 .thresh_i(thresh), .window_i(window), .clear_i(clr),
                 .total_o(total), .sefi_o(sefi), .ce_cnt_o(cec), .ue_cnt_o(uec));
  always #5 clk = ~clk;

  task automatic beat(int lane, dq_t m, logic v);
    for (int l = 0; l < N_LANES; l++) err[l] = (l == lane) ? m : '0;
    valid = v; ce = (m != 0); ue = 0;
    @(posedge clk); #1;
    valid = 0; ce = 0;
    if (v) exp_total[lane] += $countones(m);
  endtask

  initial begin
    for (int l = 0; l < N_LANES; l++) begin err[l] = '0; exp_total[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // scattered single errors, below threshold
    for (int i = 0; i < 9; i++) beat(i % N_LANES, 16'h0001 << (i % 16), 1'b1);
    beat(3, 16'hFFFF, 1'b0);                      // not valid: ignored
    for (int l = 0; l < N_LANES; l++) begin checks++; if (total[l] != 32'(exp_total[l])) failures++; end
    checks++; if (sefi != 0) failures++;
    checks++; if (cec != 9) failures++;
    // lane 5 gets 11 errors: above threshold 10
    beat(5, 16'h07FF, 1'b1);
    checks++; if (sefi != lane_mask_t'(1 << 5)) failures++;
    checks++; if (total[5] != 32'(exp_total[5])) failures++;
    // clear lane 5
    clr = lane_mask_t'(1 << 5); @(posedge clk); #1; clr = '0;
    checks++; if (sefi != 0 || total[5] != 0) failures++;
    exp_total[5] = 0;
    // window: 8 errors, window passes, 8 more -> no flag
    window = 32'd20;
    repeat (25) @(posedge clk); #1;
    beat(7, 16'h00FF, 1'b1);
    repeat (25) @(posedge clk); #1;
    beat(7, 16'h00FF, 1'b1);
    checks++; if (sefi[7]) failures++;
    checks++; if (total[7] != 32'(exp_total[7])) failures++;
    // UE counting
    err[0] = 0; valid = 1; ue = 1; @(posedge clk); #1; valid = 0; ue = 0;
    checks++; if (uec != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
