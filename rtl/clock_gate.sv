// clock_gate: latch-based clock gating cell for the ALU's unit clocks.
//
// The enable is captured by a latch that is transparent while clk=0, so it
// cannot change while clk=1, and the gated clock is clk AND the latched
// enable: gclk pulses high in exactly the cycles whose preceding low phase
// had en=1, without glitches. The enable latch is intentional.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  timeunit 1ps; timeprecision 1ps;

  logic en_l;

  ds_latch #(.W(1), .TRANSPARENT_HIGH(1'b0)) u_en_latch (.clk(clk), .d(en), .q(en_l));

  assign gclk = clk & en_l;
endmodule
