// bdt: fully pipelined boosted-decision-tree evaluator.
//
// The ensemble is N_TREES complete binary trees of depth DEPTH. Nodes of a
// tree are numbered in heap order (root 0, children of n are 2n+1 and 2n+2);
// node n of tree t sends an event to its left child when
// feat[FEAT_IDX[t][n]] < THRESH[t][n] (unsigned), otherwise to the right.
// Leaf k (k = node - N_NODES) holds the signed LEAF_W-bit score LEAF[t][k].
// The output is the sum of the selected leaf score of every tree, clamped to
// the unsigned range 0 .. 2^SCORE_W - 1 (10 bits by default).
//
// Pipeline, one event per clock:
//   cycle 1  every node of every tree compares its feature with its threshold
//            in parallel (N_TREES x N_NODES comparators, registered);
//   cycle 2  each tree walks its registered comparison bits to a leaf and
//            registers that leaf's score;
//   then     ceil(log2 N_TREES) cycles of a pairwise adder tree.
// LATENCY = 2 + ceil(log2 N_TREES); score(t) belongs to feat(t - LATENCY).
//
// That the model is a BDT, evaluated in parallel and fully pipelined, and
// that its latency grows with the ensemble's structure follows the design.
// The 10-bit score width follows the design too. The exact pipeline split,
// the "<" comparison rule and the clamping of the sum to 0 .. 1023 are
// this implementation's choices, modelled on how tree ensembles are usually
// laid out in FPGA logic. The default model is a placeholder (tau_bdt_pkg).
module bdt #(
  parameter int unsigned N_FEAT  = tau_bdt_pkg::N_VARS,
  parameter int unsigned FEAT_W  = tau_bdt_pkg::FEAT_W,
  parameter int unsigned SCORE_W = tau_bdt_pkg::SCORE_W,
  parameter int unsigned LEAF_W  = tau_bdt_pkg::LEAF_W,
  parameter int unsigned N_TREES = tau_bdt_pkg::N_TREES,
  parameter int unsigned DEPTH   = tau_bdt_pkg::DEPTH,
  parameter int unsigned FIDX_W  = $clog2(N_FEAT),
  parameter logic [N_TREES-1:0][(1<<DEPTH)-2:0][FIDX_W-1:0]  FEAT_IDX = tau_bdt_pkg::def_feat_idx(),
  parameter logic [N_TREES-1:0][(1<<DEPTH)-2:0][FEAT_W-1:0]  THRESH   = tau_bdt_pkg::def_thresh(),
  parameter logic [N_TREES-1:0][(1<<DEPTH)-1:0][LEAF_W-1:0]  LEAF     = tau_bdt_pkg::def_leaf()
) (
  input  logic                           clk,
  input  logic [N_FEAT-1:0][FEAT_W-1:0]  feat,
  output logic [SCORE_W-1:0]             score
);

  localparam int unsigned N_NODES = (1 << DEPTH) - 1;
  localparam int unsigned LVLS    = (N_TREES <= 1) ? 0 : $clog2(N_TREES);
  localparam int unsigned TPAD    = 1 << LVLS;
  localparam int unsigned SUM_W   = ((LEAF_W > SCORE_W) ? LEAF_W : SCORE_W) + LVLS + 1;

  // cycle 1: all comparisons
  logic [N_TREES-1:0][N_NODES-1:0] go_left_q;

  always_ff @(posedge clk) begin
    for (int unsigned t = 0; t < N_TREES; t++)
      for (int unsigned n = 0; n < N_NODES; n++)
        go_left_q[t][n] <= feat[FEAT_IDX[t][n]] < THRESH[t][n];
  end

  // cycle 2: walk each tree to its leaf
  function automatic int unsigned leaf_of(logic [N_NODES-1:0] go_left);
    int unsigned node = 0;
    for (int unsigned d = 0; d < DEPTH; d++)
      node = go_left[node] ? 2 * node + 1 : 2 * node + 2;
    return node - N_NODES;
  endfunction

  logic signed [SUM_W-1:0] tree_q [TPAD];

  always_ff @(posedge clk) begin
    for (int unsigned t = 0; t < TPAD; t++)
      if (t < N_TREES) tree_q[t] <= SUM_W'($signed(LEAF[t][leaf_of(go_left_q[t])]));
      else             tree_q[t] <= '0;
  end

  // cycles 3..: pairwise sum of the tree scores
  logic signed [SUM_W-1:0] total;

  if (LVLS == 0) begin : g_one
    assign total = tree_q[0];
  end else begin : g_sum
    logic signed [SUM_W-1:0] lvl_q [LVLS][TPAD/2];

    always_ff @(posedge clk) begin
      for (int unsigned k = 0; k < TPAD / 2; k++)
        lvl_q[0][k] <= tree_q[2*k] + tree_q[2*k+1];
      for (int unsigned l = 1; l < LVLS; l++)
        for (int unsigned k = 0; k < (TPAD >> (l + 1)); k++)
          lvl_q[l][k] <= lvl_q[l-1][2*k] + lvl_q[l-1][2*k+1];
    end

    assign total = lvl_q[LVLS-1][0];
  end

  // clamp to the unsigned output range
  localparam logic signed [SUM_W-1:0] S_MAX = SUM_W'((1 << SCORE_W) - 1);

  always_comb begin
    if (total > S_MAX)  score = S_MAX[SCORE_W-1:0];
    else if (total < 0) score = '0;
    else                score = total[SCORE_W-1:0];
  end

endmodule
