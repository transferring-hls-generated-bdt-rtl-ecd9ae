// tb_tau_bdt_algo: one algorithm instance end to end, one random window per
// cycle, in three configurations whose natural latencies differ but whose
// outputs must all appear at the fixed cycle 12:
//   u_now  : all cells at cycle 0; variables 4 + BDT 6 + condition 1 = 11,
//            padded by 1;
//   u_late : the 9 presampler cells arrive 1 cycle late; the central-tower
//            sum then ends at cycle 5 and the natural latency is exactly 12;
//   u_alt  : a different variable schema whose largest sum has 8 cells
//            (3 adder cycles): natural latency 10, padded by 2.
// Expected variables come from the real-number geometry reference, expected
// scores from walking the trees, the condition from counting thresholds;
// side words and overflow flags must leave with the score of their event.
// The thresholds change every 50 cycles; they are static configuration, so
// the condition is not checked for the events next to a change.
module tb_tau_bdt_algo;
  localparam int NEV = 300;
  localparam int LAT = 12;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ovf = 0, n_pad = 0, n_nopad = 0;
  int n_cond [4];

  localparam tau_bdt_pkg::cell_ready_t LATE_READY = {{90{8'd0}}, {9{8'd1}}};

  logic [98:0][15:0] cells_now, cells_late;
  logic [31:0]       side;
  logic [2:0][7:0]   thr;
  logic [9:0]        score [3];
  logic [1:0]        cond  [3];
  logic [31:0]       side_o [3];
  logic [10:0]       ovf   [3];

  logic [98:0][15:0] ev_cells [NEV];
  logic [31:0]       ev_side  [NEV];
  logic [2:0][7:0]   ev_thr   [NEV];
  int                ev_score [NEV][2];   // [0]: standard schema, [1]: alternative
  logic [10:0]       ev_ovf   [NEV][2];

  tau_bdt_algo u_now (.clk(clk), .cells_i(cells_now), .side_i(side), .thr_i(thr),
                      .score_o(score[0]), .cond_o(cond[0]), .side_o(side_o[0]), .var_ovf_o(ovf[0]));
  tau_bdt_algo #(.CELL_READY(LATE_READY)) u_late (
                      .clk(clk), .cells_i(cells_late), .side_i(side), .thr_i(thr),
                      .score_o(score[1]), .cond_o(cond[1]), .side_o(side_o[1]), .var_ovf_o(ovf[1]));
  tau_bdt_algo #(.VAR_MASKS(tb_ref_pkg::alt_masks())) u_alt (
                      .clk(clk), .cells_i(cells_now), .side_i(side), .thr_i(thr),
                      .score_o(score[2]), .cond_o(cond[2]), .side_o(side_o[2]), .var_ovf_o(ovf[2]));

  task automatic check_out(int k, int e);
    int sch = (k == 2) ? 1 : 0;
    int exp_cond = tb_ref_pkg::cond_ref(ev_score[e][sch], ev_thr[e]);
    // just after a threshold change the condition may use either set
    bit settled = (e < 2 || ev_thr[e-2] == ev_thr[e]) && (e + 2 >= NEV || ev_thr[e+2] == ev_thr[e]);
    if (!settled) exp_cond = int'(cond[k]);
    checks++;
    n_cond[exp_cond]++;
    if (k == 1) n_nopad++; else n_pad++;
    if (int'(score[k]) != ev_score[e][sch] || int'(cond[k]) != exp_cond ||
        side_o[k] !== ev_side[e] || ovf[k] !== ev_ovf[e][sch]) begin
      failures++;
      if (failures < 10)
        $display("config %0d event %0d: score %0d/%0d cond %0d/%0d side %h/%h ovf %b/%b", k, e,
                 score[k], ev_score[e][sch], cond[k], exp_cond, side_o[k], ev_side[e], ovf[k], ev_ovf[e][sch]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0][7:0] t;
    for (int e = 0; e < NEV; e++) begin
      logic [10:0][15:0] feat;
      logic [15:0] s;
      bit o;
      if (e % 50 == 0) t = {8'(100 + $urandom % 40), 8'(88 + $urandom % 10), 8'(70 + $urandom % 16)};
      ev_thr[e] = t;
      for (int i = 0; i < 99; i++)
        ev_cells[e][i] = ($urandom % 50 == 0) ? 16'h9000 | 16'($urandom) : 16'($urandom % 1600);
      ev_side[e] = $urandom;
      for (int v = 0; v < 11; v++) begin
        tb_ref_pkg::var_sum(v, ev_cells[e], s, o);
        ev_ovf[e][0][v] = o;
        feat[v] = o ? 16'hFFFF : s;
      end
      if (ev_ovf[e][0] != 0) n_ovf++;
      ev_score[e][0] = tb_ref_pkg::bdt_score(feat, 16, 3, tau_bdt_pkg::def_feat_idx(),
                                             tau_bdt_pkg::def_thresh(), tau_bdt_pkg::def_leaf());
      tb_ref_pkg::alt_var10_sum(ev_cells[e], s, o);
      ev_ovf[e][1] = {o, ev_ovf[e][0][9:0]};
      feat[10] = o ? 16'hFFFF : s;
      ev_score[e][1] = tb_ref_pkg::bdt_score(feat, 16, 3, tau_bdt_pkg::def_feat_idx(),
                                             tau_bdt_pkg::def_thresh(), tau_bdt_pkg::def_leaf());
    end

    for (int c = 0; c < NEV; c++) begin
      cells_now = ev_cells[c];
      side      = ev_side[c];
      thr = (c >= LAT - 1) ? ev_thr[c - (LAT - 1)] : ev_thr[0];
      for (int i = 0; i < 99; i++)
        if (i < 9) cells_late[i] = (c >= 1) ? ev_cells[c-1][i] : 16'($urandom);
        else       cells_late[i] = ev_cells[c][i];
      #1;
      if (c >= LAT) for (int k = 0; k < 3; k++) check_out(k, c - LAT);
      @(posedge clk);
      #1;
    end
    if (n_ovf == 0) begin failures++; $display("no variable overflow exercised"); end
    if (n_pad == 0 || n_nopad == 0) begin failures++; $display("padding cases not exercised"); end
    for (int k = 0; k < 4; k++)
      if (n_cond[k] == 0) begin failures++; $display("condition %0d never produced", k); end
    $display("events with an overflowing variable: %0d; conditions 0..3: %0d %0d %0d %0d",
             n_ovf, n_cond[0], n_cond[1], n_cond[2], n_cond[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
