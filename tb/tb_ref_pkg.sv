// tb_ref_pkg: reference models shared by the testbenches.
//
// The variable reference works from calorimeter geometry in real numbers,
// independently of the integer selection rules of the RTL: it places every
// cell at its (eta, phi) centre, computes its distance to the window centre
// and selects the cells whose distance, in units of 1e-4, matches the number
// in the variable's name (lL_dDDDD). Cell sizes: 0.025 x 0.0982 in EM1/EM2,
// 0.1 x 0.0982 elsewhere; cells are numbered layer by layer, then phi row,
// then eta column. Variable 10 is the central tower in all layers.
//
// The BDT reference walks each tree of the model node by node and clamps the
// total to the 10-bit score range.
package tb_ref_pkg;

  localparam int N_CELLS = 99;
  localparam int N_VARS  = 11;

  localparam int VAR_LAYER [10] = '{2, 2, 2, 0, 2, 2, 1, 1, 1, 1};
  localparam int VAR_DIST  [10] = '{1051, 375, 625, 0, 125, 990, 1493, 1315, 1164, 1690};

  function automatic void cell_pos(int idx, output int layer, output real eta, output real phi);
    int base, cols, r, c;
    if (idx < 9)       begin layer = 0; base = 0;  cols = 3;  end
    else if (idx < 45) begin layer = 1; base = 9;  cols = 12; end
    else if (idx < 81) begin layer = 2; base = 45; cols = 12; end
    else if (idx < 90) begin layer = 3; base = 81; cols = 3;  end
    else               begin layer = 4; base = 90; cols = 3;  end
    r = (idx - base) / cols;
    c = (idx - base) % cols;
    phi = (r - 1) * 0.0982;
    if (cols == 12) eta = (c - 5.5) * 0.025;
    else            eta = (c - 1) * 0.1;
  endfunction

  function automatic bit in_var(int v, int idx);
    int layer;
    real eta, phi, d;
    cell_pos(idx, layer, eta, phi);
    if (v == 10) return (phi == 0.0) && (eta < 0.05) && (eta > -0.05);
    if (layer != VAR_LAYER[v]) return 0;
    d = $sqrt(eta * eta + phi * phi) * 10000.0;
    return (d - VAR_DIST[v] < 0.6) && (VAR_DIST[v] - d < 0.6);
  endfunction

  // sum of a variable: value modulo 2^16 and overflow flag
  function automatic void var_sum(int v, logic [N_CELLS-1:0][15:0] cells,
                                  output logic [15:0] sum, output bit ovf);
    longint s = 0;
    for (int i = 0; i < N_CELLS; i++) if (in_var(v, i)) s += longint'(cells[i]);
    sum = s[15:0];
    ovf = (s > 65535);
  endfunction

  // alternative schema used to test reconfiguration: variable 10 becomes the
  // eight EM1 cells of l1_d1493 and l1_d1690 instead of the central tower
  function automatic tau_bdt_pkg::var_masks_t alt_masks();
    tau_bdt_pkg::var_masks_t m = tau_bdt_pkg::all_var_masks();
    m[10] = tau_bdt_pkg::var_mask(6) | tau_bdt_pkg::var_mask(9);
    return m;
  endfunction

  function automatic void alt_var10_sum(logic [N_CELLS-1:0][15:0] cells,
                                        output logic [15:0] sum, output bit ovf);
    longint s = 0;
    for (int i = 0; i < N_CELLS; i++) if (in_var(6, i) || in_var(9, i)) s += longint'(cells[i]);
    sum = s[15:0];
    ovf = (s > 65535);
  endfunction

  // BDT reference: complete trees in heap order, left when feat < thr
  function automatic int bdt_score(logic [N_VARS-1:0][15:0] feat, int n_trees, int depth,
                                   tau_bdt_pkg::feat_idx_t fidx, tau_bdt_pkg::thresh_t thr,
                                   tau_bdt_pkg::leaf_t leaf);
    int total = 0;
    for (int t = 0; t < n_trees; t++) begin
      int node = 0;
      for (int d = 0; d < depth; d++) begin
        if (feat[fidx[t][node]] < thr[t][node]) node = 2 * node + 1;
        else                                    node = 2 * node + 2;
      end
      total += int'($signed(leaf[t][node - ((1 << depth) - 1)]));
    end
    if (total > 1023) total = 1023;
    if (total < 0)    total = 0;
    return total;
  endfunction

  // score condition: how many of the thresholds (x4) the score reaches
  function automatic int cond_ref(int score, logic [2:0][7:0] thr);
    int n = 0;
    for (int k = 0; k < 3; k++) if (score >= 4 * int'(thr[k])) n++;
    return n;
  endfunction

endpackage
