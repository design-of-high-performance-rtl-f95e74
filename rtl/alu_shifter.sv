// alu_shifter: logical left shifter of the ALU, distance 0 to 5 bits.
//
// A three-level multiplexer shifter (by 1, 2 and 4) built from the same
// pass-transistor / clocked-CMOS multiplexers as the logic unit; zeros are
// shifted in. Distances above MAX_SH are clamped to MAX_SH. Combinational.
// The 5-bit range follows the original design; the direction (left,
// logical) is this implementation's choice.
module alu_shifter #(
  parameter int unsigned W      = 32,
  parameter int unsigned MAX_SH = 5
) (
  input  logic [W-1:0] a,
  input  logic [2:0]   shamt,
  output logic [W-1:0] y
);
  timeunit 1ps; timeprecision 1ps;

  logic [2:0]   sh;
  logic [W-1:0] s1, s2;

  assign sh = (shamt > 3'(MAX_SH)) ? 3'(MAX_SH) : shamt;

  assign s1 = sh[0] ? {a[W-2:0],  1'b0}  : a;
  assign s2 = sh[1] ? {s1[W-3:0], 2'b00} : s1;
  assign y  = sh[2] ? {s2[W-5:0], 4'h0}  : s2;
endmodule
