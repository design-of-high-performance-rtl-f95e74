// rf_read_port: 64-entry, 32-bit register file with a single-cycle domino
// read port (16-wide local bit lines, 2-input static NAND, 2-wide global
// bit line) and one write port.
//
// Read: raddr must be stable while clk=1. The 6:64 static decoder drives the
// word-line drivers, a footed domino stage followed by static inverters, so
// a read select is high only while clk=1 (evaluation) and every select is 0
// while clk=0 (precharge). Each of the 32 bit-slices (rf_bitline) reads the
// selected entry through LBL, NAND and GBL. The output latch is transparent
// while clk=1 and holds during precharge, so rdata is valid from the end of
// the evaluation phase until the end of the next one: one read per cycle.
// Write: the write port is not part of the original read-port study and is
// this implementation's addition so the array can be loaded: wdata is
// written to waddr at the rising edge of clk when we=1; a read in the same
// cycle returns the new data. The storage array holds no reset value.
module rf_read_port #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned LBL_W   = 16,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  timeunit 1ps; timeprecision 1ps;

  // storage array (bit cells)
  logic [WIDTH-1:0] mem [ENTRIES];
  logic [ENTRIES-1:0] ws, dec, rs;

  rf_decoder #(.AW(AW)) u_wdec (.en(we), .addr(waddr), .sel(ws));

  always_ff @(posedge clk) begin
    for (int i = 0; i < ENTRIES; i++)
      if (ws[i]) mem[i] <= wdata;
  end

  // read decoder and word-line drivers
  rf_decoder #(.AW(AW)) u_rdec (.en(re), .addr(raddr), .sel(dec));

  assign rs = dec & {ENTRIES{clk}};

  logic [WIDTH-1:0] bl;

  for (genvar k = 0; k < WIDTH; k++) begin : g_slice
    logic [ENTRIES-1:0] col;
    for (genvar i = 0; i < ENTRIES; i++) begin : g_col
      assign col[i] = mem[i][k];
    end
    rf_bitline #(.ENTRIES(ENTRIES), .LBL_W(LBL_W)) u_bl (
      .clk(clk), .rs(rs), .d(col), .q(bl[k]));
  end

  // output latch
  ds_latch #(.W(WIDTH), .TRANSPARENT_HIGH(1'b1)) u_out_latch (
    .clk(clk), .d(bl), .q(rdata));
endmodule
