// alu_input_stage: input data stage of the ALU with bus splitters and clock
// gating.
//
// The A and B buses each feed two banks of master-slave flip-flops: the
// arithmetic bank drives the adder, the logic-shift bank drives the logic and
// shifter units. The decoder's unit enables gate the clock of each bank, so
// a bank loads only when the instruction being issued uses its unit and the
// other bank (and everything it drives) does not toggle. Splitting the buses
// this way is what lowers the switched bus capacitance.
//
// Timing: a, b, arith_en and ls_en are sampled at the rising edge of clk; the
// outputs change right after that edge and hold until the bank loads again.
// Banks and enables follow the original design; using one gated clock per
// bank is this implementation's reading of "clock gating for deselected
// units".
module alu_input_stage #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         arith_en,
  input  logic         ls_en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] a_arith,
  output logic [W-1:0] b_arith,
  output logic [W-1:0] a_ls,
  output logic [W-1:0] b_ls,
  output logic         arith_clk,   // gated clocks, brought out for observation
  output logic         ls_clk
);
  timeunit 1ps; timeprecision 1ps;

  clock_gate u_cg_arith (.clk(clk), .en(arith_en), .gclk(arith_clk));
  clock_gate u_cg_ls    (.clk(clk), .en(ls_en),    .gclk(ls_clk));

  ds_ff #(.W(2*W)) u_ff_arith (.clk(arith_clk), .d({a, b}), .q({a_arith, b_arith}));
  ds_ff #(.W(2*W)) u_ff_ls    (.clk(ls_clk),    .d({a, b}), .q({a_ls, b_ls}));
endmodule
