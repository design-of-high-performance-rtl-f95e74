// alu32: 32-bit delay-testable ALU.
//
// A two-stage pipeline: the instruction is decoded in the cycle it is
// presented and the decoded control word, A and B are captured together at a
// rising clock edge; the following cycle executes. Units:
//   decoder       static decode, control word held in master-slave latches
//   input stage   A/B flip-flops split into an arithmetic bank and a
//                 logic-shift bank, each clock-gated by the decoder
//   adder         front-end mux (A or the loopback bus) + hc_adder32,
//                 compound domino, sections 1 and 2 evaluate while clk=1
//   logic/shift   alu_logic_unit and alu_shifter, static, non-critical
//   output        alu_out_mux + section 3 (cdl_stage, evaluates while
//                 clk=0) + output latch (transparent while clk=0)
//   DFT logic     dft_ctrl + dft_delay_chain produce the three footer
//                 signals; NORMAL mode holds them at 1
//   loopback      a register that captures the result at every rising edge
//                 and feeds the adder front end for OP_LOOP
//
// Timing: present instr/a/b before rising edge E0 (they are sampled there);
// the result appears during the clk=0 phase of that cycle and is held by the
// output latch from edge E1 until the next clk=0 phase, so it is read after
// E1: latency one cycle after capture, one instruction per cycle.
// In TEST mode (instr[4]=1) the ALU adds A+B and the section picked by
// instr[1:0] gets a tight evaluation window (230/390/170 ps for sections
// 1/2/3); a delay fault in that section turns into a wrong result.
// CTRL1 is instr[1] and CTRL2 is instr[0]: 00, 01 and 10 test sections 1,
// 2 and 3, and 11 is the reserved stress code (all footers stay on, as in
// NORMAL mode). In NORMAL mode the delay chain is parked at a constant level,
// so the first TEST instruction after NORMAL mode only primes the chain: its
// window may not close, so start every test sequence with one warm-up TEST
// instruction whose result is not checked.
// rst_n (synchronous, active low) loads a no-operation control word.
// Lint notes: the registered arith_en/ls_en bits of the control word are
// unused on purpose (the input stage is gated from the decoded word, one
// cycle earlier); the latches are written as always_latch blocks, so lint
// reports them as latches.
// cout is the adder carry-out for additions and 0 otherwise.
// The units and their split into critical (domino) and non-critical (static,
// reduced-swing clock) parts follow the original design; the loopback
// register and the encodings are this implementation's choices.
module alu32
  import alu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INSTR_W-1:0] instr,
  input  logic [XLEN-1:0]    a,
  input  logic [XLEN-1:0]    b,
  output logic [XLEN-1:0]    result,
  output logic               cout,
  output logic [2:0]         footer,       // DFT footers N3, N5, N7
  output logic [2:0]         sec_sel,      // section under delay test
  output logic               arith_clk,    // gated unit clocks
  output logic               ls_clk
);
  timeunit 1ps; timeprecision 1ps;

  // ---------------- decode stage ----------------
  alu_ctrl_t dec, ctrl_d, ctrl;

  alu_decoder u_dec (.instr(instr), .ctrl(dec));

  assign ctrl_d = rst_n ? dec : '0;

  ds_ff #(.W(CTRL_W)) u_ctrl_ff (.clk(clk), .d(ctrl_d), .q(ctrl));

  logic [XLEN-1:0] a_ar, b_ar, a_ls, b_ls;

  alu_input_stage #(.W(XLEN)) u_in (
    .clk(clk), .arith_en(ctrl_d.arith_en), .ls_en(ctrl_d.ls_en),
    .a(a), .b(b),
    .a_arith(a_ar), .b_arith(b_ar), .a_ls(a_ls), .b_ls(b_ls),
    .arith_clk(arith_clk), .ls_clk(ls_clk));

  // ---------------- DFT logic ----------------
  logic node_a, node_b, tclk1, tclk2, tclk3, stress;

  dft_ctrl u_dft (
    .clk(clk), .tn(ctrl.tn), .ctrl1(ctrl.ctrl[1]), .ctrl2(ctrl.ctrl[0]),
    .testclk1(tclk1), .testclk2(tclk2), .testclk3(tclk3),
    .node_a(node_a), .node_b(node_b),
    .footer(footer), .sec_sel(sec_sel), .stress(stress));

  dft_delay_chain u_chain (
    .node_a(node_a), .node_b(node_b),
    .testclk1(tclk1), .testclk2(tclk2), .testclk3(tclk3));

  // ---------------- execute stage ----------------
  logic [XLEN-1:0] lb_q, op_a, add_y, lu_y, sh_y, mux_y;
  logic            add_c;

  // adder front-end multiplexer
  assign op_a = ctrl.loopback ? lb_q : a_ar;

  hc_adder32 #(.W(XLEN)) u_add (
    .clk(clk), .footer1(footer[0]), .footer2(footer[1]),
    .a(op_a), .b(b_ar), .sum(add_y), .cout(add_c));

  alu_logic_unit #(.W(XLEN)) u_lu (.a(a_ls), .b(b_ls), .fn(ctrl.lu_fn), .y(lu_y));

  alu_shifter #(.W(XLEN), .MAX_SH(MAX_SH)) u_sh (.a(a_ls), .shamt(ctrl.shamt), .y(sh_y));

  alu_out_mux #(.W(XLEN), .N(3)) u_mux (
    .sel({ctrl.sel_shift, ctrl.sel_logic, ctrl.sel_add}),
    .d({sh_y, lu_y, add_y}), .y(mux_y));

  // section 3: adder output stage and ALU output muxes, clk=0 phase
  logic [XLEN:0] sec3_q;

  cdl_stage #(.W(XLEN+1), .EVAL_HIGH(1'b0)) u_sec3 (
    .clk(clk), .footer(footer[2]), .f({add_c & ctrl.sel_add, mux_y}), .q(sec3_q));

  // output stage latch
  ds_latch #(.W(XLEN+1), .TRANSPARENT_HIGH(1'b0)) u_out_latch (
    .clk(clk), .d(sec3_q), .q({cout, result}));

  // loopback bus register: an edge-triggered register, so the loop from the
  // result back to the adder front end always passes through a clock edge
  always_ff @(posedge clk) lb_q <= result;

  // The output mux is a wide-OR gate: at most one select may be active.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({ctrl.sel_shift, ctrl.sel_logic, ctrl.sel_add}))
    else $error("alu32: output mux select is not one-hot");

  // stress is decoded but has no effect beyond keeping all footers on
  logic unused_stress;
  assign unused_stress = stress;
endmodule
