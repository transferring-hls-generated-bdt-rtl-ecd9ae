// tau_bdt_algo: one instance of the BDT tau identification algorithm.
//
// Every 200 MHz cycle the instance takes the 99 16-bit cells of its fixed
// calorimeter window and, fully pipelined, produces a 10-bit BDT score and a
// 2-bit score condition for it:
//   - u_vars (adder_tree) sums the cell subsets that form the 11 input
//     variables. Subsets differ in size, so their sums would be ready at
//     different cycles; every variable is padded to the cycle of the slowest,
//     VAR_LAT (4 by default: the 11-cell central-tower sum), so that all
//     reach the BDT together.
//   - a variable whose sum overflowed 16 bits is fed to the BDT as 0xFFFF.
//   - u_bdt evaluates the ensemble in BDT_LAT cycles (6 by default).
//   - u_cond compares the score with three 8-bit working-point thresholds
//     (thr_i, static configuration) in one cycle.
//   - everything leaving the instance is padded to one fixed cycle,
//     OUT_LATENCY = 12: the score, its condition, the variables' overflow
//     flags and side_i, the other signals of the surrounding trigger
//     algorithm. Retraining the model or redefining the variables changes
//     VAR_LAT and BDT_LAT, but not when the results appear downstream.
// With the defaults the natural latency is 4 + 6 + 1 = 11 and one padding
// cycle brings it to 12. Elaboration fails if the natural latency exceeds
// OUT_LATENCY.
//
// VAR_MASKS (row v: the cells summed into variable v; default: the schema of
// tau_bdt_pkg) lets the variable definitions change without touching the
// code, and CELL_READY lets cells arrive at different cycles of the event;
// the alignment delays follow automatically.
//
// The structure (configurable subset sums aligned to one cycle, BDT, score
// condition, delayed side signals, 12 cycles at one result per clock) and
// the cycle positions (variables by cycle 4, BDT through cycle 10, condition
// in cycle 11, outputs at 12) follow the design. The saturation of
// overflowed variables, the width and meaning of the side signals and the
// default model are this implementation's choices.
module tau_bdt_algo #(
  parameter int unsigned SIDE_W = 32,
  parameter tau_bdt_pkg::var_masks_t  VAR_MASKS  = tau_bdt_pkg::all_var_masks(),
  parameter tau_bdt_pkg::cell_ready_t CELL_READY = '0,
  parameter int unsigned OUT_LATENCY = tau_bdt_pkg::MAX_LATENCY
) (
  input  logic                                                     clk,
  input  logic [tau_bdt_pkg::N_CELLS-1:0][tau_bdt_pkg::CELL_W-1:0] cells_i,
  input  logic [SIDE_W-1:0]                                        side_i,
  input  logic [tau_bdt_pkg::N_WP-1:0][tau_bdt_pkg::THR_W-1:0]     thr_i,
  output logic [tau_bdt_pkg::SCORE_W-1:0]                          score_o,
  output logic [1:0]                                               cond_o,
  output logic [SIDE_W-1:0]                                        side_o,
  output logic [tau_bdt_pkg::N_VARS-1:0]                           var_ovf_o
);

  localparam int unsigned N_VARS  = tau_bdt_pkg::N_VARS;
  localparam int unsigned W       = tau_bdt_pkg::CELL_W;
  localparam int unsigned SCORE_W = tau_bdt_pkg::SCORE_W;
  localparam int unsigned VAR_LAT = tau_bdt_pkg::var_latency(VAR_MASKS, CELL_READY);
  localparam int unsigned BDT_LAT = tau_bdt_pkg::bdt_latency(tau_bdt_pkg::N_TREES);
  localparam int unsigned NAT_LAT = VAR_LAT + BDT_LAT + 1;
  localparam int unsigned PAD     = (OUT_LATENCY > NAT_LAT) ? OUT_LATENCY - NAT_LAT : 0;

  if (NAT_LAT > OUT_LATENCY) begin : g_err_latency
    $error("tau_bdt_algo: latency %0d exceeds budget %0d", NAT_LAT, OUT_LATENCY);
  end

  logic [N_VARS-1:0][W-1:0] var_sum;
  logic [N_VARS-1:0]        var_ovf;
  logic [N_VARS-1:0][W-1:0] feat;
  logic [SCORE_W-1:0]       score;
  logic [1:0]               cond;

  adder_tree #(
    .W        (W),
    .N_IN     (tau_bdt_pkg::N_CELLS),
    .N_OUT    (N_VARS),
    .SUM_MASK (VAR_MASKS),
    .IN_READY (CELL_READY),
    .REQ_CYCLE(tau_bdt_pkg::same_cycle(8'(VAR_LAT)))
  ) u_vars (
    .clk      (clk),
    .in_words (cells_i),
    .out_words(var_sum),
    .out_ovf  (var_ovf)
  );

  always_comb begin
    for (int unsigned v = 0; v < N_VARS; v++) feat[v] = var_ovf[v] ? '1 : var_sum[v];
  end

  bdt u_bdt (
    .clk  (clk),
    .feat (feat),
    .score(score)
  );

  bdt_condition u_cond (
    .clk  (clk),
    .score(score),
    .thr  (thr_i),
    .cond (cond)
  );

  // align everything to OUT_LATENCY
  delay_line #(.W(SCORE_W), .DELAY(1 + PAD)) u_score_delay (
    .clk(clk), .in_word(score), .out_word(score_o)
  );

  delay_line #(.W(2), .DELAY(PAD)) u_cond_delay (
    .clk(clk), .in_word(cond), .out_word(cond_o)
  );

  delay_line #(.W(N_VARS), .DELAY(BDT_LAT + 1 + PAD)) u_ovf_delay (
    .clk(clk), .in_word(var_ovf), .out_word(var_ovf_o)
  );

  delay_line #(.W(SIDE_W), .DELAY(OUT_LATENCY)) u_side_delay (
    .clk(clk), .in_word(side_i), .out_word(side_o)
  );

endmodule
