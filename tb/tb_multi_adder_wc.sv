// tb_multi_adder_wc: drives random words, with and without overflow bits, into
// adders of 1, 3, 4 and 5 inputs (the last with one extra delay cycle) and
// checks each result at exactly ceil(log2 N) + DELAY cycles against a sum
// computed here with 64-bit arithmetic.
module tb_multi_adder_wc;
  localparam int W = 16;
  localparam int NCYC = 300;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ovf = 0;

  logic [W:0] in5 [5];
  logic [W:0] in1 [1];
  logic [W:0] in3 [3];
  logic [W:0] in4 [4];
  logic [W:0] o1, o3, o4, o5;
  logic [W:0] hist [NCYC][5];

  assign in1[0] = in5[0];
  assign in3 = '{in5[0], in5[1], in5[2]};
  assign in4 = '{in5[0], in5[1], in5[2], in5[3]};

  multi_adder_wc #(.W(W), .N(1))             u1 (.clk(clk), .in_words(in1), .out_word(o1));
  multi_adder_wc #(.W(W), .N(3))             u3 (.clk(clk), .in_words(in3), .out_word(o3));
  multi_adder_wc #(.W(W), .N(4))             u4 (.clk(clk), .in_words(in4), .out_word(o4));
  multi_adder_wc #(.W(W), .N(5), .DELAY(1))  u5 (.clk(clk), .in_words(in5), .out_word(o5));

  function automatic logic [W:0] ref_sum(int cyc, int n);
    longint s = 0;
    bit f = 0;
    for (int k = 0; k < n; k++) begin
      s += hist[cyc][k][W-1:0];
      f |= hist[cyc][k][W];
    end
    return {f | (s > 65535), s[W-1:0]};
  endfunction

  task automatic check(string name, logic [W:0] got, int cyc, int n);
    logic [W:0] exp;
    if (cyc < 0) return;
    exp = ref_sum(cyc, n);
    checks++;
    if (exp[W]) n_ovf++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch for cycle %0d: got %h exp %h", name, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCYC; c++) begin
      for (int k = 0; k < 5; k++) begin
        // mostly small values; sometimes large ones or a set overflow bit
        case ($urandom % 8)
          0:       in5[k] = {1'b0, 16'hC000 | 16'($urandom)};
          1:       in5[k] = {1'b1, 16'($urandom)};
          default: in5[k] = {1'b0, 16'($urandom % 4096)};
        endcase
        hist[c][k] = in5[k];
      end
      #1;
      check("N1", o1, c, 1);
      @(posedge clk);
      #1;
      check("N3", o3, c - 1, 3);
      check("N4", o4, c - 1, 4);
      check("N5", o5, c - 3, 5);
    end
    if (n_ovf == 0) begin failures++; $display("no overflow case exercised"); end
    $display("overflow results checked: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
