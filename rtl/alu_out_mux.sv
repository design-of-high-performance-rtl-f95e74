// alu_out_mux: one-hot wide-OR output multiplexer of the ALU.
//
// Models the domino multiplexer on the ALU's critical path: each input is
// ANDed with its select and all are ORed onto one bus, as the parallel
// pull-down paths of a wide-OR domino gate do. The selects must be one-hot or
// all zero; all zero gives 0 (the precharged value). Combinational.
module alu_out_mux #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]        sel,
  input  logic [N-1:0][W-1:0] d,
  output logic [W-1:0]        y
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) y |= d[i] & {W{sel[i]}};
  end

endmodule
