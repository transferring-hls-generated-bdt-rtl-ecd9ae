// efex_tau_fpga: the BDT tau identification of one eFEX processing FPGA.
//
// An eFEX processing FPGA runs N_INST = 8 copies of the tau algorithm side by
// side, each looking at its own fixed 99-cell region of the calorimeter, all
// clocked at 200 MHz and fully pipelined: each instance accepts a window and
// emits a 10-bit score and a 2-bit score condition every cycle, 12 cycles
// after its input. The three 8-bit working-point thresholds of the score
// condition (bdt_thr_i) are configuration shared by all instances.
//
// Next to the trigger, and independent of it, the module carries the
// three-input example network of adder_tree in its default configuration
// (A = x+y+z, B = x+y, C = y+z, inputs at cycles 0/1/3, outputs at cycles
// 5/8/7), with its own ports ex_*.
//
// Instance count and clock follow the design. The surrounding firmware (input
// links, seed finding, the rest of the tau algorithm, readout) is not part of
// this module: its signals enter and leave through side_i/side_o.
module efex_tau_fpga #(
  parameter int unsigned N_INST = 8,
  parameter int unsigned SIDE_W = 32
) (
  input  logic                                                                  clk,
  input  logic [N_INST-1:0][tau_bdt_pkg::N_CELLS-1:0][tau_bdt_pkg::CELL_W-1:0]  cells_i,
  input  logic [N_INST-1:0][SIDE_W-1:0]                                         side_i,
  input  logic [tau_bdt_pkg::N_WP-1:0][tau_bdt_pkg::THR_W-1:0]                  bdt_thr_i,
  output logic [N_INST-1:0][tau_bdt_pkg::SCORE_W-1:0]                           score_o,
  output logic [N_INST-1:0][1:0]                                                cond_o,
  output logic [N_INST-1:0][SIDE_W-1:0]                                         side_o,
  output logic [N_INST-1:0][tau_bdt_pkg::N_VARS-1:0]                            var_ovf_o,
  // worked adder-tree example
  input  logic [2:0][15:0]                                                      ex_in_i,
  output logic [2:0][15:0]                                                      ex_out_o,
  output logic [2:0]                                                            ex_ovf_o
);

  for (genvar g = 0; g < N_INST; g++) begin : g_inst
    tau_bdt_algo #(.SIDE_W(SIDE_W)) u_algo (
      .clk      (clk),
      .cells_i  (cells_i[g]),
      .side_i   (side_i[g]),
      .thr_i    (bdt_thr_i),
      .score_o  (score_o[g]),
      .cond_o   (cond_o[g]),
      .side_o   (side_o[g]),
      .var_ovf_o(var_ovf_o[g])
    );
  end

  adder_tree u_example (
    .clk      (clk),
    .in_words (ex_in_i),
    .out_words(ex_out_o),
    .out_ovf  (ex_ovf_o)
  );

endmodule
