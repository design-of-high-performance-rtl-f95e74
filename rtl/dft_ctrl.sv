// dft_ctrl: mode decode and multiplexer stages of the on-chip delay-test
// (DFT) logic.
//
// Decodes T/N, CTRL1 and CTRL2:
//   T/N=0            NORMAL: all footers at 1, delay chain parked
//   T/N=1, 00        section 1 under test (PG unit, first merge levels)
//   T/N=1, 01        section 2 under test (rest of the carry-merge tree)
//   T/N=1, 10        section 3 under test (adder output stage, ALU muxes)
//   T/N=1, 11        reserved (low-power stress testing); footers at 1
// Input multiplexers: in TEST mode node A carries CLK and node B carries
// CLKB into the delay chain; in NORMAL mode both are tied to 1 so the chain
// does not toggle and adds no clock load. Output multiplexers: the footer of
// the section under test takes its test clock (TESTCLK1/2 from CLK,
// TESTCLK3 from CLKB); every other footer is tied to 1, which gives those
// sections the whole clock phase (relaxed timing).
// Combinational. The truth table and mux structure follow the original
// design; the behaviour of the reserved code is not defined there, and
// here it simply leaves all footers on.
module dft_ctrl (
  input  logic       clk,
  input  logic       tn,          // 1: TEST mode
  input  logic       ctrl1,
  input  logic       ctrl2,
  input  logic       testclk1,    // from the delay chain
  input  logic       testclk2,
  input  logic       testclk3,
  output logic       node_a,      // to the delay chain
  output logic       node_b,
  output logic [2:0] footer,      // gates of footers N3, N5, N7
  output logic [2:0] sec_sel,     // one-hot: section under test
  output logic       stress       // reserved code selected
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    sec_sel = '0;
    stress  = 1'b0;
    if (tn) begin
      unique case ({ctrl1, ctrl2})
        2'b00: sec_sel = 3'b001;
        2'b01: sec_sel = 3'b010;
        2'b10: sec_sel = 3'b100;
        2'b11: stress  = 1'b1;
        default: sec_sel = '0;
      endcase
    end
  end

  // input multiplexers
  assign node_a = tn ? clk  : 1'b1;
  assign node_b = tn ? ~clk : 1'b1;

  // output multiplexers
  assign footer[0] = sec_sel[0] ? testclk1 : 1'b1;
  assign footer[1] = sec_sel[1] ? testclk2 : 1'b1;
  assign footer[2] = sec_sel[2] ? testclk3 : 1'b1;
endmodule
