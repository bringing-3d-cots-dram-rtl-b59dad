// current_monitor: relative supply-current check of the dies.
//
// All dies are identical, so a die in trouble (a high-current functional
// interrupt) shows up as drawing more than the others; no absolute
// calibration is needed. The averaged current of every die arrives from an
// external ADC (the averaging RC filter and the ADC are analog parts outside
// this block) as one sample per die with sample_i. For each active die the
// block compares n * I_d with sum(I) + n * margin, i.e. I_d against the mean
// of the active dies plus a programmable margin, without a divider. A die
// above it for persist_i consecutive samples is flagged (sticky until
// clear_i). Anomalies are also reported per logical lane through the
// die manager's lane map (done outside).
// The relative comparison follows the architecture; the margin/persistence
// rule is this design's. Flags update one cycle after sample_i.
module current_monitor
  import cube_pkg::*;
#(
  parameter int unsigned ADC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_i,
  input  logic [ADC_W-1:0] adc_i [N_DIES],
  input  die_mask_t        active_i,
  input  logic [ADC_W-1:0] margin_i,
  input  logic [3:0]       persist_i,
  input  die_mask_t        clear_i,
  output die_mask_t        anomaly_o
);
  localparam int unsigned SW = ADC_W + 4;   // room for 14 samples
  logic [SW-1:0] sum;
  logic [3:0]    n;
  logic [3:0]    run [N_DIES];

  always_comb begin
    sum = '0;
    n   = '0;
    for (int d = 0; d < N_DIES; d++)
      if (active_i[d]) begin
        sum += SW'(adc_i[d]);
        n   += 4'd1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      anomaly_o <= '0;
      for (int d = 0; d < N_DIES; d++) run[d] <= '0;
    end else begin
      for (int d = 0; d < N_DIES; d++) begin
        if (clear_i[d]) begin
          anomaly_o[d] <= 1'b0;
          run[d]       <= '0;
        end else if (sample_i) begin
          logic [SW+4:0] lhs, rhs;
          lhs = (SW+5)'(adc_i[d]) * (SW+5)'(n);
          rhs = (SW+5)'(sum) + (SW+5)'(margin_i) * (SW+5)'(n);
          if (active_i[d] && lhs > rhs) begin
            run[d] <= (run[d] == 4'hF) ? run[d] : run[d] + 1;
            if (run[d] + 1 >= persist_i) anomaly_o[d] <= 1'b1;
          end else begin
            run[d] <= '0;
          end
        end
      end
    end
  end
endmodule
