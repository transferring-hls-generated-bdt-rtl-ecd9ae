// tau_bdt_pkg: constants, input-variable schema and default BDT model of the
// tau identification algorithm.
//
// Calorimeter window. One algorithm instance sees 99 cells of 16 bits: the
// presampler (PS, layer 0), the two fine electromagnetic layers (EM1 and EM2,
// layers 1 and 2) and the back EM and hadronic layers (EM3 and HAD, layers 3
// and 4). PS, EM3 and HAD are 3 x 3 towers of 0.1 x 0.0982 in eta x phi; EM1
// and EM2 are 12 x 3 cells of 0.025 x 0.0982 (four cells per tower in eta).
// 9 + 36 + 36 + 9 + 9 = 99. Cells are numbered layer by layer (PS, EM1, EM2,
// EM3, HAD), and inside a layer row by row in phi, then by column in eta:
//   index = LAYER_BASE[layer] + phi_row * LAYER_COLS[layer] + eta_col.
// The window centre is the centre of the central tower.
//
// Input variables. A variable named lL_dDDDD is the sum of the cells of layer
// L whose centres lie at distance 0.DDDD from the window centre, with
// distance = sqrt(deta^2 + dphi^2). Working in units of 0.0125 in eta, the
// EM1/EM2 column c sits at eta offset 2c - 11 units and a 3 x 3 tower column
// c at 8(c - 1) units; the phi offset is phi_row - 1 towers. Each variable is
// therefore a (layer set, |phi offset|, |eta offset| range) selection:
//   l2_d0125 -> EM2, dphi 0, |deta| 1 unit   (0.0125)
//   l2_d1051 -> EM2, dphi 1, |deta| 3 units  (sqrt(0.0375^2 + 0.0982^2))
// and so on. An eleventh variable sums all cells of the central tower in all
// five layers. The ten named variables and the central-tower sum follow the
// design; the cell numbering, the distance rule that turns names into cells
// and the reading of "central tower" as all five layers are this
// implementation's.
//
// BDT model. The trained model is not part of this description; DEF_* below
// is a placeholder ensemble (N_TREES complete trees of depth DEPTH) whose
// feature indices, thresholds and leaf scores come from simple integer
// formulas. Replace them with a trained model's values.
package tau_bdt_pkg;

  localparam int unsigned N_CELLS = 99;
  localparam int unsigned CELL_W  = 16;
  localparam int unsigned N_VARS  = 11;
  localparam int unsigned N_LAYERS = 5;

  // latency budget of one instance, in 200 MHz cycles (used by tau_bdt_algo)
  localparam int unsigned MAX_LATENCY = 12;

  typedef logic [N_CELLS-1:0]             cell_mask_t;
  typedef logic [N_VARS-1:0][N_CELLS-1:0] var_masks_t;
  typedef logic [N_CELLS-1:0][7:0]        cell_ready_t;

  // selection rule of one input variable
  typedef struct packed {
    logic [N_LAYERS-1:0] layers;   // bit L: layer L takes part
    logic [1:0]          phi_abs;  // |phi offset| in towers
    logic [4:0]          eta_lo;   // |eta offset| range, units of 0.0125
    logic [4:0]          eta_hi;
  } var_sel_t;

  function automatic int unsigned layer_base(int unsigned layer);
    case (layer)
      0: return 0;
      1: return 9;
      2: return 45;
      3: return 81;
      default: return 90;
    endcase
  endfunction

  function automatic int unsigned layer_cols(int unsigned layer);
    return (layer == 1 || layer == 2) ? 12 : 3;
  endfunction

  // |eta offset| of a column, units of 0.0125
  function automatic int unsigned eta_abs(int unsigned layer, int unsigned col);
    int e;
    if (layer == 1 || layer == 2) e = 2 * int'(col) - 11;
    else                          e = 8 * (int'(col) - 1);
    return (e < 0) ? -e : e;
  endfunction

  function automatic var_sel_t var_sel(int unsigned v);
    case (v)
      0:  return '{layers: 5'b00100, phi_abs: 2'd1, eta_lo: 5'd3,  eta_hi: 5'd3};   // l2_d1051
      1:  return '{layers: 5'b00100, phi_abs: 2'd0, eta_lo: 5'd3,  eta_hi: 5'd3};   // l2_d0375
      2:  return '{layers: 5'b00100, phi_abs: 2'd0, eta_lo: 5'd5,  eta_hi: 5'd5};   // l2_d0625
      3:  return '{layers: 5'b00001, phi_abs: 2'd0, eta_lo: 5'd0,  eta_hi: 5'd0};   // l0_d0000
      4:  return '{layers: 5'b00100, phi_abs: 2'd0, eta_lo: 5'd1,  eta_hi: 5'd1};   // l2_d0125
      5:  return '{layers: 5'b00100, phi_abs: 2'd1, eta_lo: 5'd1,  eta_hi: 5'd1};   // l2_d0990
      6:  return '{layers: 5'b00010, phi_abs: 2'd1, eta_lo: 5'd9,  eta_hi: 5'd9};   // l1_d1493
      7:  return '{layers: 5'b00010, phi_abs: 2'd1, eta_lo: 5'd7,  eta_hi: 5'd7};   // l1_d1315
      8:  return '{layers: 5'b00010, phi_abs: 2'd1, eta_lo: 5'd5,  eta_hi: 5'd5};   // l1_d1164
      9:  return '{layers: 5'b00010, phi_abs: 2'd1, eta_lo: 5'd11, eta_hi: 5'd11};  // l1_d1690
      default:
          return '{layers: 5'b11111, phi_abs: 2'd0, eta_lo: 5'd0,  eta_hi: 5'd3};   // central tower
    endcase
  endfunction

  function automatic cell_mask_t var_mask(int unsigned v);
    cell_mask_t m = '0;
    var_sel_t   s = var_sel(v);
    for (int unsigned l = 0; l < N_LAYERS; l++)
      if (s.layers[l])
        for (int unsigned r = 0; r < 3; r++)
          for (int unsigned c = 0; c < layer_cols(l); c++) begin
            int unsigned e = eta_abs(l, c);
            int unsigned p = (r == 1) ? 0 : 1;
            if (p == int'(s.phi_abs) && e >= int'(s.eta_lo) && e <= int'(s.eta_hi))
              m[layer_base(l) + r * layer_cols(l) + c] = 1'b1;
          end
    return m;
  endfunction

  function automatic var_masks_t all_var_masks();
    var_masks_t m;
    for (int unsigned v = 0; v < N_VARS; v++) m[v] = var_mask(v);
    return m;
  endfunction

  // cycle at which every variable exists, for cells arriving at READY[i]
  function automatic int unsigned var_latency(var_masks_t masks, cell_ready_t ready);
    int unsigned lat = 0;
    for (int unsigned v = 0; v < N_VARS; v++) begin
      int unsigned n = 0;
      int unsigned a = 0;
      int unsigned t;
      for (int unsigned i = 0; i < N_CELLS; i++)
        if (masks[v][i]) begin
          n++;
          if (int'(ready[i]) > a) a = int'(ready[i]);
        end
      t = a + ((n <= 1) ? 0 : $clog2(n));
      if (t > lat) lat = t;
    end
    return lat;
  endfunction

  // all variables required at one cycle
  function automatic logic [N_VARS-1:0][7:0] same_cycle(logic [7:0] c);
    logic [N_VARS-1:0][7:0] r;
    for (int unsigned v = 0; v < N_VARS; v++) r[v] = c;
    return r;
  endfunction

  // ---- BDT ------------------------------------------------------------------
  // 10-bit score; 16 trees give a 6-cycle BDT, which with the 4-cycle
  // variables and the 1-cycle score condition leaves the result at cycle 11,
  // one cycle inside the 12-cycle budget.
  localparam int unsigned FEAT_W  = CELL_W;
  localparam int unsigned SCORE_W = 10;
  localparam int unsigned LEAF_W  = 16;
  localparam int unsigned N_TREES = 16;
  localparam int unsigned DEPTH   = 3;
  localparam int unsigned N_NODES  = (1 << DEPTH) - 1;
  localparam int unsigned N_LEAVES = 1 << DEPTH;
  localparam int unsigned FIDX_W  = $clog2(N_VARS);

  typedef logic [N_TREES-1:0][N_NODES-1:0][FIDX_W-1:0]  feat_idx_t;
  typedef logic [N_TREES-1:0][N_NODES-1:0][FEAT_W-1:0]  thresh_t;
  typedef logic [N_TREES-1:0][N_LEAVES-1:0][LEAF_W-1:0]  leaf_t;

  // placeholder model: node n of tree t tests feature (3t + 5n) mod 11 against
  // 64 + ((1237 t + 811 n) mod 4096); leaf k of tree t scores
  // ((37 t + 53 k) mod 81) - 16
  function automatic feat_idx_t def_feat_idx();
    feat_idx_t f;
    for (int unsigned t = 0; t < N_TREES; t++)
      for (int unsigned n = 0; n < N_NODES; n++)
        f[t][n] = FIDX_W'((3 * t + 5 * n) % N_VARS);
    return f;
  endfunction

  function automatic thresh_t def_thresh();
    thresh_t h;
    for (int unsigned t = 0; t < N_TREES; t++)
      for (int unsigned n = 0; n < N_NODES; n++)
        h[t][n] = FEAT_W'(64 + (1237 * t + 811 * n) % 4096);
    return h;
  endfunction

  function automatic leaf_t def_leaf();
    leaf_t s;
    for (int unsigned t = 0; t < N_TREES; t++)
      for (int unsigned k = 0; k < N_LEAVES; k++)
        s[t][k] = LEAF_W'(int'((37 * t + 53 * k) % 81) - 16);
    return s;
  endfunction

  // score condition: 3 working-point thresholds of 8 bits, 2-bit result
  localparam int unsigned N_WP  = 3;
  localparam int unsigned THR_W = 8;

  // compare stage + leaf stage + ceil(log2 N_TREES) adder stages
  function automatic int unsigned bdt_latency(int unsigned n_trees);
    return 2 + ((n_trees <= 1) ? 0 : $clog2(n_trees));
  endfunction

endpackage
