// cdl_stage: one section of compound-domino logic with a DFT footer,
// modelled at the logic level as "evaluate and hold".
//
// A domino section precharges during one clock phase and evaluates during the
// other. In the precharge phase its static outputs are 0. In the evaluation
// phase the outputs follow the section's logic value f only while the footer
// transistor is on (footer=1); once the footer turns off, the dynamic nodes
// can no longer discharge and the outputs keep whatever they had reached.
// In NORMAL mode the footer is held at 1, so the section behaves as ordinary
// domino logic. In TEST mode the footer is the delayed, inverted test clock:
// it closes an evaluation window a fixed time after the evaluation phase
// opens. A section whose logic settles later than the window (a delay fault)
// keeps a stale value - 0 for a freshly precharged section - which shows up at
// the primary outputs as a stuck-at failure. That conversion of delay faults
// into logic failures is the mechanism of the delay-test scheme.
//
// EVAL_HIGH=1: evaluates while clk=1, precharges while clk=0 (adder PG and
// carry-merge sections). EVAL_HIGH=0: the opposite (adder output stage and
// ALU output multiplexers). The hold is a latch by design.
module cdl_stage #(
  parameter int unsigned W         = 1,
  parameter bit          EVAL_HIGH = 1'b1
) (
  input  logic         clk,
  input  logic         footer,   // gate of the DFT footer transistor
  input  logic [W-1:0] f,        // settled logic value of the section
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (clk != EVAL_HIGH) q <= '0;      // precharge
    else if (footer)      q <= f;       // evaluation inside the window
  end
endmodule
