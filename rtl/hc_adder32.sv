// hc_adder32: 32-bit unsigned adder with a sparse radix-2 Han-Carlson
// carry-merge tree and carry-select 4-bit output blocks.
//
// Carry-generate section (compound domino, in the clk=1 phase):
//   PG unit       P_i = A_i | B_i, G_i = A_i & B_i  (footed input stage)
//   section 1     PG unit plus the first two merge levels, which combine the
//                 four bits of each block into a block (G, P) pair
//   section 2     the rest of the merge tree: a Han-Carlson prefix over the
//                 8 blocks (Kogge-Stone on the odd blocks, one extra level
//                 for the even ones) giving the 1-in-4 carries
//                 C3, C7, ..., C31, with C_i = G_i + P_i C_{i-1}
// Sum-generate section (static, in parallel with the tree):
//   for every 4-bit block two ripple-carry adders form the sums for a block
//   carry-in of 0 and of 1; the block carry from the tree picks one.
//
// Sections 1 and 2 are cdl_stage instances whose footers come from the DFT
// logic (tie them to 1 for plain operation). A latch, transparent while
// clk=1, holds the carries through the clk=0 phase, so sum and cout are valid
// from the end of the evaluation window until the end of the next clk=0
// phase. There is no carry input: the adder is a 32-bit unsigned adder.
// Structure and carry spacing follow the original design; the exact split of
// merge levels between sections 1 and 2 is this implementation's reading.
module hc_adder32 #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4      // bits per carry-select block
) (
  input  logic         clk,
  input  logic         footer1,   // N3 footer: PG + first merge levels
  input  logic         footer2,   // N5 footer: rest of the merge tree
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NB  = W / BLK;        // number of blocks
  localparam int unsigned LVL = $clog2(NB);     // block-level tree depth

  // ---------------- section 1: PG and block (G, P) ----------------
  logic [W-1:0]  p, g;
  logic [NB-1:0] bg_f, bp_f, bg, bp;

  assign p = a | b;
  assign g = a & b;

  always_comb begin
    for (int k = 0; k < NB; k++) begin
      logic gg, pp;
      gg = g[k*BLK];
      pp = p[k*BLK];
      for (int i = 1; i < BLK; i++) begin
        gg = g[k*BLK+i] | (p[k*BLK+i] & gg);
        pp = p[k*BLK+i] & pp;
      end
      bg_f[k] = gg;
      bp_f[k] = pp;
    end
  end

  cdl_stage #(.W(2*NB), .EVAL_HIGH(1'b1)) u_sec1 (
    .clk(clk), .footer(footer1), .f({bg_f, bp_f}), .q({bg, bp}));

  // ---------------- section 2: Han-Carlson prefix over blocks ----------------
  logic [NB-1:0] c_f, c_q, c_l;

  always_comb begin
    logic [NB-1:0] tg, tp, ng, np;
    tg = bg;
    tp = bp;
    // level 1: odd blocks merge with their even neighbour
    ng = tg; np = tp;
    for (int k = 1; k < NB; k += 2) begin
      ng[k] = tg[k] | (tp[k] & tg[k-1]);
      np[k] = tp[k] & tp[k-1];
    end
    tg = ng; tp = np;
    // levels 2..LVL: Kogge-Stone among odd blocks, distance 2^(l-1)
    for (int l = 2; l <= LVL; l++) begin
      ng = tg; np = tp;
      for (int k = 1; k < NB; k += 2) begin
        if (k >= (1 << (l-1))) begin
          ng[k] = tg[k] | (tp[k] & tg[k-(1<<(l-1))]);
          np[k] = tp[k] & tp[k-(1<<(l-1))];
        end
      end
      tg = ng; tp = np;
    end
    // last level: even blocks take the carry of the odd block below
    ng = tg;
    for (int k = 2; k < NB; k += 2) ng[k] = tg[k] | (tp[k] & tg[k-1]);
    c_f = ng;      // c_f[k] = carry out of bit BLK*k+BLK-1
  end

  cdl_stage #(.W(NB), .EVAL_HIGH(1'b1)) u_sec2 (
    .clk(clk), .footer(footer2), .f(c_f), .q(c_q));

  // carries held through the clk=0 phase for the output stage
  ds_latch #(.W(NB), .TRANSPARENT_HIGH(1'b1)) u_carry_latch (
    .clk(clk), .d(c_q), .q(c_l));

  // ---------------- sum generate: carry-select ripple blocks ----------------
  logic [NB-1:0][BLK-1:0] s0, s1;

  always_comb begin
    for (int k = 0; k < NB; k++) begin
      logic r0, r1;
      r0 = 1'b0;
      r1 = 1'b1;
      for (int i = 0; i < BLK; i++) begin
        s0[k][i] = a[k*BLK+i] ^ b[k*BLK+i] ^ r0;
        s1[k][i] = a[k*BLK+i] ^ b[k*BLK+i] ^ r1;
        r0 = (a[k*BLK+i] & b[k*BLK+i]) | ((a[k*BLK+i] ^ b[k*BLK+i]) & r0);
        r1 = (a[k*BLK+i] & b[k*BLK+i]) | ((a[k*BLK+i] ^ b[k*BLK+i]) & r1);
      end
    end
  end

  always_comb begin
    sum[BLK-1:0] = s0[0];
    for (int k = 1; k < NB; k++)
      sum[k*BLK +: BLK] = c_l[k-1] ? s1[k] : s0[k];
  end

  assign cout = c_l[NB-1];
endmodule
