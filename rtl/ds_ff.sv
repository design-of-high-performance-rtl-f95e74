// ds_ff: positive-edge master-slave flip-flop built from two dual-supply
// latches, as used for the ALU input data stage and the decoder outputs.
//
// The master latch is transparent while clk=0 and the slave while clk=1, so
// q takes the value d had just before the rising edge of clk and holds it
// for the whole cycle. With a gated clock that stays low, the slave holds.
// There is no reset, as in the cell it models; a reset is applied upstream
// by forcing d. The two latches are intentional.
module ds_ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] m;

  ds_latch #(.W(W), .TRANSPARENT_HIGH(1'b0)) u_master (.clk(clk), .d(d), .q(m));
  ds_latch #(.W(W), .TRANSPARENT_HIGH(1'b1)) u_slave  (.clk(clk), .d(m), .q(q));
endmodule
