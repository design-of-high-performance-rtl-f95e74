// alu_decoder: instruction decoder of the 32-bit ALU.
//
// Purely combinational static logic. It turns the 5-bit instruction into the
// control word alu_ctrl_t: the one-hot output-mux selects, the logic-unit
// function, the shift distance, the loopback select of the adder front end,
// and the two unit enables that serve both as clock-gating signals and as
// bus-splitter controls (the arithmetic copy or the logic-shift copy of the
// A/B buses is loaded, never both).
//
// instr[4] is T/N. With T/N=1 every NORMAL-mode control is forced to 0
// except the arithmetic path, so the adder runs A+B under test, and
// instr[1:0] are passed on as {CTRL1, CTRL2}. Opcodes 11..15 decode to an
// all-zero word (nothing enabled, output mux selects nothing, result 0).
// The mode bit, TEST-mode behaviour and the instruction classes follow the
// original design; the encodings are this implementation's choice.
module alu_decoder
  import alu_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output alu_ctrl_t          ctrl
);
  timeunit 1ps; timeprecision 1ps;

  logic [3:0] op;
  assign op = instr[3:0];

  always_comb begin
    ctrl = '0;
    if (instr[INSTR_W-1]) begin
      // TEST mode: only the arithmetic unit operates.
      ctrl.tn       = 1'b1;
      ctrl.ctrl     = instr[1:0];
      ctrl.arith_en = 1'b1;
      ctrl.sel_add  = 1'b1;
    end else begin
      unique case (op)
        OP_ADD: begin
          ctrl.arith_en = 1'b1;
          ctrl.sel_add  = 1'b1;
        end
        OP_LOOP: begin
          ctrl.arith_en = 1'b1;
          ctrl.loopback = 1'b1;
          ctrl.sel_add  = 1'b1;
        end
        OP_INV, OP_AND, OP_OR, OP_XOR: begin
          ctrl.ls_en     = 1'b1;
          ctrl.sel_logic = 1'b1;
          ctrl.lu_fn     = lu_fn_e'(op - OP_INV);
        end
        OP_SHL1, OP_SHL2, OP_SHL3, OP_SHL4, OP_SHL5: begin
          ctrl.ls_en     = 1'b1;
          ctrl.sel_shift = 1'b1;
          ctrl.shamt     = 3'(op - OP_SHL1 + 4'd1);
        end
        default: ctrl = '0;
      endcase
    end
  end
endmodule
