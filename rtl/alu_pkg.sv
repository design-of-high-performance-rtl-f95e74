// alu_pkg: types and constants shared by the 32-bit delay-testable ALU.
//
// The ALU takes a 5-bit instruction. Bit 4 is the mode bit T/N: 0 selects
// NORMAL operation, 1 selects TEST (delay-test) operation. In NORMAL mode bits
// [3:0] are the opcode below; in TEST mode bits [1:0] are CTRL1/CTRL2, which
// choose the adder section whose evaluation window is tightened, and the ALU
// performs A+B. That gives 11 NORMAL and 4 TEST instructions, 15 in all.
// The mode bit and the count of 15 instructions follow the original design;
// the binary encoding and the split of the 11 NORMAL opcodes (one shift
// opcode per shift distance 1..5) are this implementation's choice.
package alu_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned XLEN    = 32;  // datapath width
  localparam int unsigned INSTR_W = 5;   // {T/N, opcode[3:0]}
  localparam int unsigned MAX_SH  = 5;   // largest shift distance

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // A + B (unsigned)
    OP_LOOP = 4'd1,   // loopback: previous result + B
    OP_INV  = 4'd2,   // ~A
    OP_AND  = 4'd3,   // A & B
    OP_OR   = 4'd4,   // A | B
    OP_XOR  = 4'd5,   // A ^ B
    OP_SHL1 = 4'd6,   // A << 1
    OP_SHL2 = 4'd7,
    OP_SHL3 = 4'd8,
    OP_SHL4 = 4'd9,
    OP_SHL5 = 4'd10   // A << 5; codes 11..15 are no-operations
  } opcode_e;

  // Function select of the pass-transistor logic unit.
  typedef enum logic [1:0] {
    LU_INV = 2'd0,
    LU_AND = 2'd1,
    LU_OR  = 2'd2,
    LU_XOR = 2'd3
  } lu_fn_e;

  // Decoded control word, held by the decoder's output latches for the
  // execute cycle. An all-zero word is a no-operation.
  typedef struct packed {
    logic       tn;         // 1: TEST mode
    logic [1:0] ctrl;       // {CTRL1, CTRL2} of the DFT logic (TEST only)
    logic       arith_en;   // clock enable / bus splitter: arithmetic side
    logic       ls_en;      // clock enable / bus splitter: logic-shift side
    logic       loopback;   // adder front-end mux takes the loopback bus
    lu_fn_e     lu_fn;      // logic unit function
    logic [2:0] shamt;      // shift distance 0..5
    logic       sel_add;    // output mux one-hot selects
    logic       sel_logic;
    logic       sel_shift;
  } alu_ctrl_t;

  localparam int unsigned CTRL_W = $bits(alu_ctrl_t);
endpackage
