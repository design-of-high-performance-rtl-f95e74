// ds_latch: static D latch of the dual-supply clocking scheme.
//
// The circuit is an n-MOS-only latch: an SRAM-like storage pair written
// through an n-MOS pass transistor on one side and a two-high n-MOS pull-down
// stack on the other, with no clocked p-MOS device, so it can be clocked by a
// reduced-swing (0..VDDL) clock while its data swings 0..VDDH without static
// current. Logically it is a plain level-sensitive D latch, which is what this
// model describes; the supply and device details have no logic meaning.
//
// TRANSPARENT_HIGH selects the phase: 1 = transparent while clk=1 and holding
// while clk=0; 0 = the opposite. The latch is intentional (this is a latch
// cell), so a tool's latch warning on q is expected.
module ds_latch #(
  parameter int unsigned W                = 1,
  parameter bit          TRANSPARENT_HIGH = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (clk == TRANSPARENT_HIGH) q <= d;
  end
endmodule
