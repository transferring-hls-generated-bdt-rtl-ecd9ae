// tb_bdt_condition: sweeps every 10-bit score against several threshold sets
// (ordered, equal, unordered, zero and all-ones) and checks the registered
// 2-bit condition one cycle later against a count of passed thresholds
// computed here (threshold byte t stands for score 4t).
module tb_bdt_condition;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist_cond [4];

  logic [9:0]      score;
  logic [2:0][7:0] thr;
  logic [1:0]      cond;
  int              exp_q;

  bdt_condition dut (.clk(clk), .score(score), .thr(thr), .cond(cond));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0][7:0] sets [5];
    sets[0] = {8'd200, 8'd120, 8'd40};
    sets[1] = {8'd64, 8'd64, 8'd64};
    sets[2] = {8'd10, 8'd250, 8'd100};
    sets[3] = {8'd0, 8'd0, 8'd0};
    sets[4] = {8'd255, 8'd255, 8'd255};
    exp_q = -1;
    for (int s = 0; s < 5; s++) begin
      thr = sets[s];
      for (int v = 0; v < 1024; v++) begin
        score = 10'(v);
        @(posedge clk);
        #1;
        // cond now belongs to the score driven just before the edge
        checks++;
        exp_q = tb_ref_pkg::cond_ref(v, thr);
        hist_cond[exp_q]++;
        if (int'(cond) != exp_q) begin
          failures++;
          if (failures < 10) $display("set %0d score %0d: cond %0d exp %0d", s, v, cond, exp_q);
        end
      end
    end
    for (int k = 0; k < 4; k++)
      if (hist_cond[k] == 0) begin failures++; $display("condition %0d never produced", k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
