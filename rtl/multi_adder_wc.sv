// multi_adder_wc: pipelined N-input adder of words that carry an overflow bit.
//
// Each input word is W+1 bits: bits W-1:0 are an unsigned value and bit W is
// an overflow ("carry") flag. The inputs are added pairwise in a binary tree
// with one register per tree level, so the sum of N inputs leaves after
// STAGES = ceil(log2 N) clock cycles; N = 1 takes no cycle at all. A further
// DELAY cycles of plain delay can be appended (DELAY = 0 by default).
//
// Overflow: a pairwise add keeps the low W bits of the sum and sets the flag
// if either operand already had it set or the add carried out of bit W-1.
// The flag therefore marks any sum whose true value did not fit in W bits;
// the data bits are then the true sum modulo 2^W.
//
// The ceil(log2 N) latency and the stage/delay pair of parameters follow the
// summation element of the design; the wrap-and-flag overflow rule is this
// implementation's reading of the "with carry" word.
//
// Timing: out_word(t) = sum of in_words(t - STAGES - DELAY).
module multi_adder_wc #(
  parameter int unsigned W      = 16,
  parameter int unsigned N      = 4,
  parameter int unsigned DELAY  = 0,
  parameter int unsigned STAGES = (N <= 1) ? 0 : $clog2(N)
) (
  input  logic         clk,
  input  logic [W:0]   in_words [N],
  output logic [W:0]   out_word
);

  localparam int unsigned NPAD = 1 << STAGES;

  initial assert (STAGES == ((N <= 1) ? 0 : $clog2(N)))
    else $error("multi_adder_wc: STAGES must be ceil(log2 N)");

  // add two carry words: low W bits of the sum, sticky overflow
  function automatic logic [W:0] add_wc(logic [W:0] a, logic [W:0] b);
    logic [W:0] s;
    s = {1'b0, a[W-1:0]} + {1'b0, b[W-1:0]};
    return {a[W] | b[W] | s[W], s[W-1:0]};
  endfunction

  logic [W:0] in_pad [NPAD];
  logic [W:0] sum_w;

  always_comb begin
    for (int unsigned k = 0; k < NPAD; k++) in_pad[k] = (k < N) ? in_words[k] : '0;
  end

  if (STAGES == 0) begin : g_comb
    assign sum_w = in_pad[0];
  end else begin : g_tree
    // lvl_q[l] holds the NPAD >> (l+1) partial sums after l+1 register stages
    logic [W:0] lvl_q [STAGES][NPAD/2];

    always_ff @(posedge clk) begin
      for (int unsigned k = 0; k < NPAD / 2; k++)
        lvl_q[0][k] <= add_wc(in_pad[2*k], in_pad[2*k+1]);
      for (int unsigned l = 1; l < STAGES; l++)
        for (int unsigned k = 0; k < (NPAD >> (l + 1)); k++)
          lvl_q[l][k] <= add_wc(lvl_q[l-1][2*k], lvl_q[l-1][2*k+1]);
    end

    assign sum_w = lvl_q[STAGES-1][0];
  end

  delay_line #(.W(W + 1), .DELAY(DELAY)) u_delay (
    .clk     (clk),
    .in_word (sum_w),
    .out_word(out_word)
  );

endmodule
