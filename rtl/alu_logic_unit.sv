// alu_logic_unit: logic unit of the ALU (INV, AND, OR, XOR).
//
// Each bit-slice follows the swing-restored pass-transistor structure: B acts
// as the select of n-MOS pass-transistor multiplexers that pass A, ~A or a
// constant, giving AND = B ? A : 0, OR = B ? 1 : A, XOR = B ? ~A : A, and
// INV = ~A; a clocked-CMOS multiplexer at the output picks the function.
// The keeper that restores the full swing of the pass-transistor node has no
// logic effect. Combinational; non-critical in timing.
module alu_logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  lu_fn_e       fn,
  output logic [W-1:0] y
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] f_and, f_or, f_xor, f_inv;

  // Pass-transistor bit-slices: B steers which value reaches the node.
  for (genvar i = 0; i < W; i++) begin : g_slice
    assign f_and[i] = b[i] ? a[i]  : 1'b0;
    assign f_or[i]  = b[i] ? 1'b1  : a[i];
    assign f_xor[i] = b[i] ? ~a[i] : a[i];
    assign f_inv[i] = ~a[i];
  end

  // Output multiplexer.
  always_comb begin
    unique case (fn)
      LU_INV:  y = f_inv;
      LU_AND:  y = f_and;
      LU_OR:   y = f_or;
      LU_XOR:  y = f_xor;
      default: y = f_inv;
    endcase
  end
endmodule
