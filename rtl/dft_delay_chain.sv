// dft_delay_chain: BEHAVIOURAL MODEL (not synthesizable) of the inverter
// delay chain of the delay-test logic.
//
// In silicon this is an odd number of sized static CMOS inverters between the
// input and output multiplexers of the DFT logic; its sizing sets the width
// of each evaluation window, which has no logic-level description, so the
// delays are modelled with timing controls. Each output is the inverse of its
// input delayed by a fixed time (continuous-assignment delay, so pulses shorter than
// the delay are swallowed, as in a slow inverter chain):
//   TESTCLK1 = ~node_a delayed by D1_PS (230 ps)
//   TESTCLK2 = ~node_a delayed by D2_PS (390 ps); it shares the first D1_PS
//              of the chain with TESTCLK1
//   TESTCLK3 = ~node_b delayed by D3_PS (170 ps); node_b carries CLKB
// The delays include a safety margin of about one fan-out-of-3 inverter
// delay (~60 ps), and are the 180 nm values of the original design.
// Time unit: 1 ps.
module dft_delay_chain #(
  parameter int unsigned D1_PS = 230,
  parameter int unsigned D2_PS = 390,
  parameter int unsigned D3_PS = 170
) (
  input  logic node_a,
  input  logic node_b,
  output logic testclk1,
  output logic testclk2,
  output logic testclk3
);
  timeunit 1ps; timeprecision 1ps;

  assign #(D1_PS)         testclk1 = ~node_a;
  assign #(D2_PS - D1_PS) testclk2 = testclk1;
  assign #(D3_PS)         testclk3 = ~node_b;
endmodule
