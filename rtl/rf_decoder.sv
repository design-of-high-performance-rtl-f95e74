// rf_decoder: static n:2^n address decoder of the register file.
//
// Produces a one-hot select for the addressed entry when en=1 and all zeros
// otherwise. Timing is non-critical, so it is plain static logic (2-input
// NAND/NOR gates in silicon). Combinational. Used for the 6:64 read-select
// decoder and for the write-select decoder.
module rf_decoder #(
  parameter int unsigned AW = 6
) (
  input  logic              en,
  input  logic [AW-1:0]     addr,
  output logic [2**AW-1:0]  sel
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    sel = '0;
    if (en) sel[addr] = 1'b1;
  end
endmodule
