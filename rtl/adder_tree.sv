// adder_tree: configurable, fully pipelined network of sums and delays.
//
// The network computes N_OUT sums over N_IN input words. Row j of SUM_MASK
// lists the inputs of sum j. Inputs need not arrive together: input i of an
// event is presented IN_READY[i] cycles after the event's cycle 0. Each sum
// is built in three steps, each of them a fixed number of register stages:
//   1. align   - every input of sum j is delayed until the latest of them
//                has arrived (cycle ALIGN_j = max of their IN_READY);
//   2. add     - a multi_adder_wc adds the n_j inputs in ceil(log2 n_j)
//                cycles, so the sum exists at cycle ALIGN_j + ceil(log2 n_j);
//   3. pad     - the sum is delayed further to the required output cycle
//                REQ_CYCLE[j]; REQ_CYCLE[j] = 8'hFF means "unspecified" and
//                the sum is output as soon as it exists.
// So out_words[j] for an event leaves at OUT_CYCLE_j = REQ_CYCLE[j] (or the
// natural cycle) after that event's cycle 0, one new event per clock. A
// required cycle earlier than the natural one is rejected at elaboration.
//
// Words are W-bit unsigned values. Internally each carries an overflow bit;
// out_ovf[j] is set when sum j did not fit in W bits, and out_words[j] then
// holds the sum modulo 2^W.
//
// The align/add/pad structure, the ceil(log2 n) adder latency, one delay per
// input-to-sum edge and the default configuration (the three-input example
// A = x+y+z, B = x+y, C = y+z with x, y, z ready at cycles 0, 1, 3 and B, C
// required at cycles 8 and 7, which puts A at cycle 5) follow the design.
// Expressing the configuration as parameters evaluated at elaboration time,
// rather than by generating source text, is this implementation's choice.
module adder_tree #(
  parameter int unsigned W     = 16,
  parameter int unsigned N_IN  = 3,
  parameter int unsigned N_OUT = 3,
  parameter logic [N_OUT-1:0][N_IN-1:0] SUM_MASK  = {3'b110, 3'b011, 3'b111},
  parameter logic [N_IN-1:0][7:0]       IN_READY  = {8'd3, 8'd1, 8'd0},
  parameter logic [N_OUT-1:0][7:0]      REQ_CYCLE = {8'd7, 8'd8, 8'hFF}
) (
  input  logic                      clk,
  input  logic [N_IN-1:0][W-1:0]    in_words,
  output logic [N_OUT-1:0][W-1:0]   out_words,
  output logic [N_OUT-1:0]          out_ovf
);

  // ---- elaboration-time schedule -------------------------------------------
  function automatic int unsigned n_terms(int unsigned j);
    int unsigned n = 0;
    for (int unsigned i = 0; i < N_IN; i++) if (SUM_MASK[j][i]) n++;
    return n;
  endfunction

  // index of the k-th input (counting from 0) that sum j uses
  function automatic int unsigned term_index(int unsigned j, int unsigned k);
    int unsigned n = 0;
    int unsigned idx = 0;
    for (int unsigned i = 0; i < N_IN; i++)
      if (SUM_MASK[j][i]) begin
        if (n == k) idx = i;
        n++;
      end
    return idx;
  endfunction

  function automatic int unsigned align_cycle(int unsigned j);
    int unsigned c = 0;
    for (int unsigned i = 0; i < N_IN; i++)
      if (SUM_MASK[j][i] && int'(IN_READY[i]) > c) c = int'(IN_READY[i]);
    return c;
  endfunction

  function automatic int unsigned add_stages(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  function automatic int unsigned natural_cycle(int unsigned j);
    return align_cycle(j) + add_stages(n_terms(j));
  endfunction

  // ---- one pipeline per sum ------------------------------------------------
  for (genvar j = 0; j < N_OUT; j++) begin : g_sum
    localparam int unsigned NT    = n_terms(j);
    localparam int unsigned ALIGN = align_cycle(j);
    localparam int unsigned NAT   = natural_cycle(j);
    localparam int unsigned OUTC  = (REQ_CYCLE[j] == 8'hFF) ? NAT : int'(REQ_CYCLE[j]);

    if (NT == 0) begin : g_err_empty
      $error("adder_tree: sum %0d has no inputs", j);
    end
    if (OUTC < NAT) begin : g_err_late
      $error("adder_tree: sum %0d required at cycle %0d but ready at %0d", j, OUTC, NAT);
    end

    logic [W:0] terms [NT];
    logic [W:0] sum_wc;
    logic [W:0] out_wc;

    // step 1: align every input of this sum to the latest one
    for (genvar k = 0; k < NT; k++) begin : g_edge
      localparam int unsigned IDX = term_index(j, k);
      delay_line #(.W(W + 1), .DELAY(ALIGN - int'(IN_READY[IDX]))) u_align (
        .clk     (clk),
        .in_word ({1'b0, in_words[IDX]}),
        .out_word(terms[k])
      );
    end

    // step 2: pipelined sum
    multi_adder_wc #(.W(W), .N(NT), .DELAY(0)) u_add (
      .clk     (clk),
      .in_words(terms),
      .out_word(sum_wc)
    );

    // step 3: pad to the required output cycle
    delay_line #(.W(W + 1), .DELAY(OUTC - NAT)) u_pad (
      .clk     (clk),
      .in_word (sum_wc),
      .out_word(out_wc)
    );

    assign out_words[j] = out_wc[W-1:0];
    assign out_ovf[j]   = out_wc[W];
  end

endmodule
