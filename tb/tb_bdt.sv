// tb_bdt: random feature vectors, one per cycle, through
//   u_def : the default 16-tree, depth-3 model (score expected 6 cycles later);
//   u_sat : a 3-tree, depth-2 model with large leaf scores, so that the sum
//           is clamped at both ends of the 10-bit range (3 trees: 2 adder
//           levels, 4 cycles).
// Expected scores come from walking each tree node by node here.
module tb_bdt;
  localparam int NEV = 400;
  localparam int LAT_DEF = 6;
  localparam int LAT_SAT = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;
  int leaf_hits [16][8];

  logic [10:0][15:0] feat;
  logic [10:0][15:0] hist [NEV];
  logic [9:0] s_def, s_sat;

  bdt u_def (.clk(clk), .feat(feat), .score(s_def));

  // small model: node n of tree t tests feature t+n against 1000*(n+1);
  // leaves of tree t: +/-20000-ish
  localparam logic [2:0][2:0][3:0]  S_FIDX = {{4'd4, 4'd3, 4'd2}, {4'd3, 4'd2, 4'd1}, {4'd2, 4'd1, 4'd0}};
  localparam logic [2:0][2:0][15:0] S_THR  = {{16'd3000, 16'd2000, 16'd1000}, {16'd3000, 16'd2000, 16'd1000},
                                              {16'd3000, 16'd2000, 16'd1000}};
  localparam logic [2:0][3:0][15:0] S_LEAF = {{16'sd20000, 16'sd100, -16'sd100, -16'sd20000},
                                              {16'sd20000, 16'sd200, -16'sd200, -16'sd20000},
                                              {16'sd20000, 16'sd300, -16'sd300, -16'sd20000}};

  bdt #(.N_TREES(3), .DEPTH(2), .FEAT_IDX(S_FIDX), .THRESH(S_THR), .LEAF(S_LEAF))
    u_sat (.clk(clk), .feat(feat), .score(s_sat));

  function automatic int ref_small(logic [10:0][15:0] f);
    int total = 0;
    for (int t = 0; t < 3; t++) begin
      int node = 0;
      for (int d = 0; d < 2; d++)
        node = (f[S_FIDX[t][node]] < S_THR[t][node]) ? 2 * node + 1 : 2 * node + 2;
      total += int'($signed(S_LEAF[t][node - 3]));
    end
    if (total > 1023) total = 1023;
    if (total < 0)    total = 0;
    return total;
  endfunction

  // the leaf tree t of the default model reaches, for coverage
  function automatic int def_leaf_of(logic [10:0][15:0] f, int t);
    tau_bdt_pkg::feat_idx_t fi = tau_bdt_pkg::def_feat_idx();
    tau_bdt_pkg::thresh_t   th = tau_bdt_pkg::def_thresh();
    int node = 0;
    for (int d = 0; d < 3; d++) node = (f[fi[t][node]] < th[t][node]) ? 2 * node + 1 : 2 * node + 2;
    return node - 7;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NEV; c++) begin
      for (int v = 0; v < 11; v++)
        feat[v] = ($urandom % 16 == 0) ? 16'hFFFF : 16'($urandom % 4400);
      hist[c] = feat;
      #1;
      if (c >= LAT_DEF) begin
        automatic int exp = tb_ref_pkg::bdt_score(hist[c - LAT_DEF], 16, 3, tau_bdt_pkg::def_feat_idx(),
                                                  tau_bdt_pkg::def_thresh(), tau_bdt_pkg::def_leaf());
        checks++;
        for (int t = 0; t < 16; t++) leaf_hits[t][def_leaf_of(hist[c - LAT_DEF], t)]++;
        if (int'(s_def) != exp) begin
          failures++;
          if (failures < 10) $display("default model event %0d: got %0d exp %0d", c - LAT_DEF, s_def, exp);
        end
      end
      if (c >= LAT_SAT) begin
        automatic int exp = ref_small(hist[c - LAT_SAT]);
        checks++;
        if (exp == 1023) n_sat_hi++;
        if (exp == 0) n_sat_lo++;
        if (int'(s_sat) != exp) begin
          failures++;
          if (failures < 10) $display("small model event %0d: got %0d exp %0d", c - LAT_SAT, s_sat, exp);
        end
      end
      @(posedge clk);
      #1;
    end
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    for (int t = 0; t < 16; t++)
      for (int k = 0; k < 8; k++)
        if (leaf_hits[t][k] == 0) $display("note: default tree %0d leaf %0d never reached", t, k);
    $display("saturated high %0d, low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
