// tb_adder_tree: runs a stream of events, one per cycle, through two
// configurations of the adder tree, each input of an event arriving at its own
// cycle, and checks every output of every event at the exact cycle it must
// appear.
//   ex : the three-input example, A = x+y+z, B = x+y, C = y+z with x, y, z at
//        cycles 0, 1, 3; expected output cycles A 5, B 8, C 7.
//   g6 : six inputs at cycles 0,2,0,1,4,0; S0 = i0+i1+i2+i3+i5 (natural cycle
//        2 + 3 = 5), S1 = i4 required at cycle 6 (natural 4), S2 = i0+i5
//        required at cycle 1 (natural 1); expected cycles 5, 6, 1.
// Expected sums are computed here in 64-bit arithmetic; overflow included.
module tb_adder_tree;
  localparam int NEV = 300;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ovf = 0;

  // example
  localparam int EX_READY [3] = '{0, 1, 3};
  localparam int EX_OUTC  [3] = '{5, 8, 7};
  localparam bit [2:0] EX_MASK [3] = '{3'b111, 3'b011, 3'b110};
  logic [2:0][15:0] ex_in, ex_out;
  logic [2:0]       ex_ovf;
  logic [15:0] ex_data [NEV][3];

  adder_tree u_ex (.clk(clk), .in_words(ex_in), .out_words(ex_out), .out_ovf(ex_ovf));

  // six-input configuration
  localparam int G_READY [6] = '{0, 2, 0, 1, 4, 0};
  localparam int G_OUTC  [3] = '{5, 6, 1};
  localparam bit [5:0] G_MASK [3] = '{6'b101111, 6'b010000, 6'b100001};
  logic [5:0][15:0] g_in;
  logic [2:0][15:0] g_out;
  logic [2:0]       g_ovf;
  logic [15:0] g_data [NEV][6];

  adder_tree #(
    .W(16), .N_IN(6), .N_OUT(3),
    .SUM_MASK ({6'b100001, 6'b010000, 6'b101111}),
    .IN_READY ({8'd0, 8'd4, 8'd1, 8'd0, 8'd2, 8'd0}),
    .REQ_CYCLE({8'd1, 8'd6, 8'hFF})
  ) u_g6 (.clk(clk), .in_words(g_in), .out_words(g_out), .out_ovf(g_ovf));

  function automatic logic [15:0] rnd_word();
    return ($urandom % 10 == 0) ? 16'hB000 | 16'($urandom) : 16'($urandom % 8192);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEV; e++) begin
      for (int i = 0; i < 3; i++) ex_data[e][i] = rnd_word();
      for (int i = 0; i < 6; i++) g_data[e][i] = rnd_word();
    end
    for (int c = 0; c < NEV; c++) begin
      // present every input of event e at cycle e + its ready cycle
      for (int i = 0; i < 3; i++)
        ex_in[i] = (c - EX_READY[i] >= 0) ? ex_data[c - EX_READY[i]][i] : 16'($urandom);
      for (int i = 0; i < 6; i++)
        g_in[i] = (c - G_READY[i] >= 0) ? g_data[c - G_READY[i]][i] : 16'($urandom);
      #1;
      for (int j = 0; j < 3; j++) begin
        automatic int e = c - EX_OUTC[j];
        if (e >= 0) begin
          automatic longint s = 0;
          for (int i = 0; i < 3; i++) if (EX_MASK[j][i]) s += longint'(ex_data[e][i]);
          checks++;
          if (s > 65535) n_ovf++;
          if (ex_out[j] !== s[15:0] || ex_ovf[j] !== (s > 65535)) begin
            failures++;
            if (failures < 10) $display("ex out %0d event %0d: got %h/%b exp %h", j, e, ex_out[j], ex_ovf[j], s[16:0]);
          end
        end
      end
      for (int j = 0; j < 3; j++) begin
        automatic int e = c - G_OUTC[j];
        if (e >= 0) begin
          automatic longint s = 0;
          for (int i = 0; i < 6; i++) if (G_MASK[j][i]) s += longint'(g_data[e][i]);
          checks++;
          if (s > 65535) n_ovf++;
          if (g_out[j] !== s[15:0] || g_ovf[j] !== (s > 65535)) begin
            failures++;
            if (failures < 10) $display("g6 out %0d event %0d: got %h/%b exp %h", j, e, g_out[j], g_ovf[j], s[16:0]);
          end
        end
      end
      @(posedge clk);
      #1;
    end
    if (n_ovf == 0) begin failures++; $display("no overflow exercised"); end
    $display("overflowing sums checked: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
