// tb_current_monitor: equal currents flag nothing; a die above the mean of
// the active dies by more than the margin for persist samples is flagged;
// one sample above is not enough with persist 2; inactive dies are ignored;
// clear removes the flag.
module tb_current_monitor;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0, smp = 0;
  logic [11:0] adc [N_DIES];
  die_mask_t act = 14'h1FFF, clr = '0, an;
  logic [11:0] margin = 12'd100;
  logic [3:0] persist = 4'd2;
  int checks = 0, failures = 0;
  current_monitor dut (.clk, .rst_n, .sample_i(smp), .adc_i(adc), .active_i(act),
    .margin_i(margin), .persist_i(persist), .clear_i(clr), .anomaly_o(an));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic sample();
    @(negedge clk); smp = 1; @(negedge clk); smp = 0;
  endtask
  initial begin
    for (int d = 0; d < N_DIES; d++) adc[d] = 12'd1000;
    adc[13] = 12'd4000;                       // spare unpowered, not active
    repeat (2) @(posedge clk); rst_n = 1;
    sample(); sample();
    chk(an == 0, "no anomaly");
    // die 4 at 1200: mean = (12*1000+1200)/13 = 1015.4, +100 -> flagged
    adc[4] = 12'd1200;
    sample();
    chk(an == 0, "one sample not enough");
    sample();
    chk(an == die_mask_t'(1 << 4), "die 4 flagged");
    // die 7 at 1100: mean ~1023, +100 = 1123 -> not flagged
    adc[7] = 12'd1100;
    sample(); sample();
    chk(!an[7], "die 7 within margin");
    clr = die_mask_t'(1 << 4); @(negedge clk); clr = '0; adc[4] = 12'd1000;
    sample(); sample();
    chk(an == 0, "cleared");
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
