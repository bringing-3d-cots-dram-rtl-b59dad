// tb_edac: the 128-bit word through encoder lanes and back through the
// decoders. Checks: clean round trip; any one whole lane (die) replaced by
// garbage is corrected and its failing bits are reported exactly on that
// lane; two lanes corrupted in the same row give UE; one-cycle latency on
// both sides.
module tb_edac;
  import cube_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t wd, rd;
  dq_t wl [N_LANES];
  dq_t rl [N_LANES];
  dq_t re [N_LANES];
  logic rv_i = 0, rv_o, ce, ue;
  int checks = 0, failures = 0;

  edac dut (.clk, .rst_n, .wdata_i(wd), .wlane_o(wl), .rvalid_i(rv_i), .rlane_i(rl),
            .rvalid_o(rv_o), .rdata_o(rd), .rerr_o(re), .ce_o(ce), .ue_o(ue));
  always #5 clk = ~clk;

  initial begin
    wd = '0;
    for (int l = 0; l < N_LANES; l++) rl[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      word_t w;
      dq_t   saved [N_LANES];
      dq_t   bad;
      int    lane, lane2;
      for (int i = 0; i < 4; i++) w[i*32 +: 32] = $urandom;
      wd = w;
      @(posedge clk); #1;                     // one cycle to the lanes
      // data lane k bit r is bit k of byte r
      checks++;
      for (int r = 0; r < ROWS; r++) for (int k = 0; k < N_DATA; k++)
        if (wl[k][r] !== w[r*8+k]) begin failures++; r = ROWS; break; end
      for (int l = 0; l < N_LANES; l++) saved[l] = wl[l];
      lane = $urandom_range(0, N_LANES - 1);
      bad  = 16'($urandom) | 16'h0001;
      lane2 = (lane + 1 + $urandom_range(0, N_LANES - 2)) % N_LANES;
      unique case (t % 3)
        0: for (int l = 0; l < N_LANES; l++) rl[l] = saved[l];
        1: for (int l = 0; l < N_LANES; l++) rl[l] = (l == lane) ? saved[l] ^ bad : saved[l];
        default: for (int l = 0; l < N_LANES; l++)
                   rl[l] = (l == lane || l == lane2) ? saved[l] ^ 16'h0010 : saved[l];
      endcase
      rv_i = 1;
      @(posedge clk); #1;
      rv_i = 0;
      checks++;
      if (!rv_o) failures++;
      unique case (t % 3)
        0: begin checks++; if (rd !== w || ce || ue) failures++; end
        1: begin
          checks++; if (rd !== w || !ce || ue) failures++;
          for (int l = 0; l < N_LANES; l++) begin
            checks++;
            if (re[l] !== ((l == lane) ? bad : 16'h0)) failures++;
          end
        end
        default: begin checks++; if (!ue) failures++; end
      endcase
    end
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
