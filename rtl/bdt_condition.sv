// bdt_condition: turns the BDT score into a 2-bit working-point condition.
//
// The score is compared with N_WP = 3 threshold bytes, one per working point
// (for instance loose, medium, tight), supplied as run-time configuration.
// The result is the number of thresholds the score reaches:
//   cond = #{ k : score[SCORE_W-1 -: THR_W] >= thr[k] }   (0 .. 3)
// i.e. each 8-bit threshold is compared with the 8 most significant bits of
// the 10-bit score (a threshold step is 4 score units; the two low score
// bits do not take part). With thresholds in
// increasing order the condition is 0 (none passed) .. 3 (tightest passed).
// One register stage: cond belongs to the score of the previous cycle.
//
// The block, its place after the BDT, the 10-bit score, the 3 x 8-bit
// thresholds and the 2-bit result follow the design. Counting the passed
// thresholds and comparing against the score's top bits are this
// implementation's reading of how the three bytes become two bits.
module bdt_condition #(
  parameter int unsigned SCORE_W = tau_bdt_pkg::SCORE_W,
  parameter int unsigned THR_W   = tau_bdt_pkg::THR_W,
  parameter int unsigned N_WP    = tau_bdt_pkg::N_WP
) (
  input  logic                        clk,
  input  logic [SCORE_W-1:0]          score,
  input  logic [N_WP-1:0][THR_W-1:0]  thr,
  output logic [$clog2(N_WP+1)-1:0]   cond
);

  localparam int unsigned CW = $clog2(N_WP + 1);

  always_ff @(posedge clk) begin
    logic [CW-1:0] n;
    n = '0;
    for (int unsigned k = 0; k < N_WP; k++)
      if (score[SCORE_W-1 -: THR_W] >= thr[k]) n = n + 1'b1;
    cond <= n;
  end

endmodule
