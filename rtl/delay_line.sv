// delay_line: fixed-length pipeline delay of one word.
//
// The word presented on in_word at clock edge k appears on out_word after
// DELAY rising edges, i.e. a shift register of DELAY stages. With DELAY = 0
// the output is the input, combinationally, so a generator can instantiate
// it unconditionally for a delay that happens to be zero (clk is then
// unused, which lint reports for such instances).
//
// It plays two roles in the design. With W = data width + 1 it is the
// "delay with carry" element that pads a partial sum, carry bit included, to
// the cycle at which it is needed. With any W it carries the other signals of
// the algorithm alongside the BDT so that they stay aligned with the score.
//
// Like the rest of the datapath it has no reset: registers hold whatever
// they were loaded with, and valid data leaves the line DELAY cycles after it
// entered. This matches a fully pipelined trigger datapath that is clocked
// continuously; the length is the only parameter and is set by the user.
module delay_line #(
  parameter int unsigned W     = 17,
  parameter int unsigned DELAY = 1
) (
  input  logic         clk,
  input  logic [W-1:0] in_word,
  output logic [W-1:0] out_word
);

  if (DELAY == 0) begin : g_wire
    assign out_word = in_word;
  end else begin : g_regs
    logic [W-1:0] stage_q [DELAY];

    always_ff @(posedge clk) begin
      stage_q[0] <= in_word;
      for (int unsigned i = 1; i < DELAY; i++) stage_q[i] <= stage_q[i-1];
    end

    assign out_word = stage_q[DELAY-1];
  end

endmodule
