// rf_bitline: read path of one bit-slice of the register file: local bit
// lines (LBL), static NAND merge, global bit line (GBL).
//
// Wide-OR domino organisation, shown with the default 64 entries:
//   LBL   ENTRIES/LBL_W dynamic nodes, each LBL_W wide (16): a two-high
//         n-MOS stack per entry (read select RS_i over stored bit D_i)
//         discharges the node when the entry is selected and holds a 1
//   NAND  a 2-input static NAND merges each pair of LBLs into S_j; an
//         n-MOS transistor driven by CLKB pulls S_j low during precharge,
//         which speeds up precharge and cuts its short-circuit current
//   GBL   one dynamic node with ENTRIES/(2*LBL_W) single n-MOS pull-downs
//         (2-wide); it discharges when any S_j is high
//   out   the inverted GBL, i.e. the stored bit of the selected entry
// During precharge (clk=0) all read selects are 0 and the dynamic nodes are
// high; the keepers that hold them against leakage have no logic effect.
// Combinational on clk, rs and d; the data is valid while clk=1.
// The 16-wide LBL / 2-wide GBL split is the low-energy configuration of the
// original design; 8-wide / 4-wide is LBL_W=8.
module rf_bitline #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned LBL_W   = 16
) (
  input  logic               clk,
  input  logic [ENTRIES-1:0] rs,    // read selects (word lines), 0 in precharge
  input  logic [ENTRIES-1:0] d,     // stored bits of this column
  output logic               q
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NLBL = ENTRIES / LBL_W;   // local bit lines
  localparam int unsigned NS   = NLBL / 2;          // NAND outputs = GBL width

  logic [NLBL-1:0] lbl;    // dynamic LBL nodes, 1 = not discharged
  logic [NS-1:0]   s;      // NAND outputs
  logic            gbl;    // dynamic GBL node

  for (genvar j = 0; j < NLBL; j++) begin : g_lbl
    assign lbl[j] = ~|(rs[j*LBL_W +: LBL_W] & d[j*LBL_W +: LBL_W]);
  end

  for (genvar j = 0; j < NS; j++) begin : g_nand
    // NAND with the CLKB precharge pull-down on its output
    assign s[j] = ~(lbl[2*j] & lbl[2*j+1]) & clk;
  end

  assign gbl = ~|s;
  assign q   = ~gbl;
endmodule
