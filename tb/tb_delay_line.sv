// tb_delay_line: checks delays of 0, 1 and 5 cycles against a history of the
// random words driven in, cycle by cycle.
module tb_delay_line;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [16:0] din;
  logic [16:0] d0, d1, d5;
  logic [16:0] hist [$];

  delay_line #(.W(17), .DELAY(0)) u0 (.clk(clk), .in_word(din), .out_word(d0));
  delay_line #(.W(17), .DELAY(1)) u1 (.clk(clk), .in_word(din), .out_word(d1));
  delay_line #(.W(17), .DELAY(5)) u5 (.clk(clk), .in_word(din), .out_word(d5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      din = 17'($urandom);
      hist.push_front(din);
      #1;
      checks++;
      if (d0 !== din) begin failures++; $display("DELAY0 mismatch cycle %0d", cyc); end
      @(posedge clk);
      #1;
      if (cyc >= 1) begin
        checks++;
        if (d1 !== hist[0]) begin failures++; $display("DELAY1 mismatch cycle %0d", cyc); end
      end
      if (cyc >= 5) begin
        checks++;
        if (d5 !== hist[4]) begin
          failures++; $display("DELAY5 mismatch cycle %0d: %h vs %h", cyc, d5, hist[4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
