// datapath_top: the two datapath units side by side.
//
//   u_alu  alu32: 32-bit two-stage ALU (add, loopback add, INV/AND/OR/XOR,
//          left shift by 1..5) with on-chip delay-test logic that can tighten
//          the evaluation window of any one of three domino sections
//   u_rf   rf_read_port: 64 x 32 register file with a single-cycle
//          16-wide-LBL / 2-wide-GBL domino read port and one write port
//
// The two units do not exchange data here; each has its own clock and
// ports, prefixed alu_ and rf_. Their timing is described in alu32.sv and
// rf_read_port.sv.
module datapath_top
  import alu_pkg::*;
(
  // ALU
  input  logic               alu_clk,
  input  logic               alu_rst_n,
  input  logic [INSTR_W-1:0] alu_instr,
  input  logic [XLEN-1:0]    alu_a,
  input  logic [XLEN-1:0]    alu_b,
  output logic [XLEN-1:0]    alu_result,
  output logic               alu_cout,
  output logic [2:0]         alu_footer,
  output logic [2:0]         alu_sec_sel,
  output logic               alu_arith_clk,
  output logic               alu_ls_clk,
  // register file
  input  logic               rf_clk,
  input  logic               rf_re,
  input  logic [5:0]         rf_raddr,
  output logic [31:0]        rf_rdata,
  input  logic               rf_we,
  input  logic [5:0]         rf_waddr,
  input  logic [31:0]        rf_wdata
);
  timeunit 1ps; timeprecision 1ps;

  alu32 u_alu (
    .clk(alu_clk), .rst_n(alu_rst_n), .instr(alu_instr), .a(alu_a), .b(alu_b),
    .result(alu_result), .cout(alu_cout), .footer(alu_footer),
    .sec_sel(alu_sec_sel), .arith_clk(alu_arith_clk), .ls_clk(alu_ls_clk));

  rf_read_port #(.ENTRIES(64), .WIDTH(32), .LBL_W(16)) u_rf (
    .clk(rf_clk), .re(rf_re), .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata));
endmodule
