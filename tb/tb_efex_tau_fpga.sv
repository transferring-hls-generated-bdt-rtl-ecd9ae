// tb_efex_tau_fpga: the whole FPGA at its default size, end to end.
//
// Each of the 8 algorithm instances receives its own random 99-cell window
// and side word every cycle; every score, side word and overflow vector must
// come out exactly 9 cycles later (within the 12-cycle budget). The example
// adder tree beside it gets x, y, z of each event at cycles 0, 1, 3 and must
// give A, B, C at cycles 5, 8, 7. Expected values come from the reference
// models in tb_ref_pkg and from 64-bit sums.
//
// Mechanisms counted, each of which must occur: a variable overflowing into
// saturation; each of the four score conditions; a result from every instance on consecutive cycles (one new
// result per clock); side words delivered aligned with their score; example
// sums padded to a later required cycle (B and C) and inputs held back to
// meet a late one (A).
module tb_efex_tau_fpga;
  localparam int NEV    = 120;
  localparam int N_INST = 8;
  localparam int LAT    = 12;
  localparam int BUDGET = 12;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cond [4];
  int n_ovf = 0, n_back_to_back = 0, n_side = 0, n_padded = 0, n_held = 0;

  logic [N_INST-1:0][98:0][15:0] cells;
  logic [N_INST-1:0][31:0]       side;
  logic [N_INST-1:0][9:0]        score;
  logic [N_INST-1:0][1:0]        cond;
  logic [2:0][7:0]               thr = {8'd118, 8'd94, 8'd78};
  logic [N_INST-1:0][31:0]       side_o;
  logic [N_INST-1:0][10:0]       ovf;
  logic [2:0][15:0] ex_in, ex_out;
  logic [2:0]       ex_ovf;

  efex_tau_fpga dut (
    .clk(clk), .cells_i(cells), .side_i(side), .bdt_thr_i(thr), .score_o(score), .cond_o(cond), .side_o(side_o), .var_ovf_o(ovf),
    .ex_in_i(ex_in), .ex_out_o(ex_out), .ex_ovf_o(ex_ovf)
  );

  logic [98:0][15:0] ev_cells [NEV][N_INST];
  logic [31:0]       ev_side  [NEV][N_INST];
  int                ev_score [NEV][N_INST];
  logic [10:0]       ev_ovf   [NEV][N_INST];
  logic [15:0]       ex_data  [NEV][3];

  localparam int EX_READY [3] = '{0, 1, 3};
  localparam int EX_OUTC  [3] = '{5, 8, 7};
  localparam bit [2:0] EX_MASK [3] = '{3'b111, 3'b011, 3'b110};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEV; e++) begin
      for (int g = 0; g < N_INST; g++) begin
        logic [10:0][15:0] feat;
        for (int i = 0; i < 99; i++)
          ev_cells[e][g][i] = ($urandom % 60 == 0) ? 16'hA000 | 16'($urandom) : 16'($urandom % 1600);
        ev_side[e][g] = $urandom;
        for (int v = 0; v < 11; v++) begin
          logic [15:0] s;
          bit o;
          tb_ref_pkg::var_sum(v, ev_cells[e][g], s, o);
          ev_ovf[e][g][v] = o;
          feat[v] = o ? 16'hFFFF : s;
        end
        if (ev_ovf[e][g] != 0) n_ovf++;
        ev_score[e][g] = tb_ref_pkg::bdt_score(feat, 16, 3, tau_bdt_pkg::def_feat_idx(),
                                               tau_bdt_pkg::def_thresh(), tau_bdt_pkg::def_leaf());
      end
      for (int i = 0; i < 3; i++) ex_data[e][i] = ($urandom % 8 == 0) ? 16'hC000 | 16'($urandom) : 16'($urandom);
    end
    if (LAT > BUDGET) begin failures++; $display("latency over budget"); end

    for (int c = 0; c < NEV; c++) begin
      for (int g = 0; g < N_INST; g++) begin
        cells[g] = ev_cells[c][g];
        side[g]  = ev_side[c][g];
      end
      for (int i = 0; i < 3; i++)
        ex_in[i] = (c >= EX_READY[i]) ? ex_data[c - EX_READY[i]][i] : 16'($urandom);
      #1;
      if (c >= LAT) begin
        automatic int e = c - LAT;
        automatic bit all_ok = 1;
        for (int g = 0; g < N_INST; g++) begin
          automatic int exp_cond = tb_ref_pkg::cond_ref(ev_score[e][g], thr);
          checks++;
          n_cond[exp_cond]++;
          if (int'(score[g]) != ev_score[e][g] || ovf[g] !== ev_ovf[e][g] || int'(cond[g]) != exp_cond) begin
            failures++;
            all_ok = 0;
            if (failures < 10) $display("inst %0d event %0d: score %0d/%0d cond %0d/%0d ovf %b/%b", g, e,
                                        score[g], ev_score[e][g], cond[g], exp_cond, ovf[g], ev_ovf[e][g]);
          end
          checks++;
          if (side_o[g] !== ev_side[e][g]) begin
            failures++;
            all_ok = 0;
            if (failures < 10) $display("inst %0d event %0d: side %h/%h", g, e, side_o[g], ev_side[e][g]);
          end else n_side++;
        end
        if (all_ok && e > 0) n_back_to_back++;
      end
      for (int j = 0; j < 3; j++) begin
        automatic int e = c - EX_OUTC[j];
        if (e >= 0) begin
          automatic longint s = 0;
          for (int i = 0; i < 3; i++) if (EX_MASK[j][i]) s += longint'(ex_data[e][i]);
          checks++;
          if (ex_out[j] !== s[15:0] || ex_ovf[j] !== (s > 65535)) begin
            failures++;
            if (failures < 10) $display("example out %0d event %0d: %h/%b exp %h", j, e, ex_out[j], ex_ovf[j], s[16:0]);
          end else if (j == 0) n_held++;
          else n_padded++;
        end
      end
      @(posedge clk);
      #1;
    end
    $display("windows with an overflowing variable: %0d", n_ovf);
    $display("cycles with all 8 results right on consecutive events: %0d", n_back_to_back);
    $display("side words aligned: %0d, example sums held/padded: %0d/%0d", n_side, n_held, n_padded);
    for (int k = 0; k < 4; k++)
      if (n_cond[k] == 0) begin failures++; $display("score condition %0d never produced", k); end
    $display("score conditions 0..3: %0d %0d %0d %0d", n_cond[0], n_cond[1], n_cond[2], n_cond[3]);
    if (n_ovf == 0)          begin failures++; $display("overflow never happened"); end
    if (n_back_to_back == 0) begin failures++; $display("no back-to-back results"); end
    if (n_side == 0)         begin failures++; $display("no aligned side word"); end
    if (n_held == 0 || n_padded == 0) begin failures++; $display("example delays not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
