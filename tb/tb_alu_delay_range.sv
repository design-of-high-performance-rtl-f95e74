// tb_alu_delay_range: delay-fault detection range of the ALU, section by
// section, with and without the evaluation windows.
//
// For each of the three test sections a fault is modelled as a late
// evaluation: the section's logic value reaches its domino nodes d ps after
// its evaluation phase opens (rising edge for sections 1 and 2, falling edge
// for section 3). d is swept and the ALU result (A+B) is compared with the
// right sum. Three conditions are measured:
//   TEST  at 200 MHz, the section under test  -> caught when d > its window
//                                                (230 / 390 / 170 ps)
//   NORMAL at 200 MHz (slow tester, no DFT)   -> caught only when d exceeds
//                                                the 2500 ps half period
//   NORMAL at 1.5 GHz (at-speed, no DFT)      -> caught when d > 333 ps
// Every point is checked against that rule, and the smallest caught delay
// of each condition is printed. This is the zero-delay counterpart of a
// detection-range table: the windows give a slow tester the resolution of
// an at-speed test.
module tb_alu_delay_range;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned half_ps = 2500;
  logic clk = 1'b0;
  always #(half_ps) clk = ~clk;

  logic               rst_n;
  logic [INSTR_W-1:0] instr;
  logic [XLEN-1:0]    a, b, result;
  logic               cout, arith_clk, ls_clk;
  logic [2:0]         footer, sec_sel;
  int checks = 0, failures = 0;

  alu32 dut (.*);

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Late evaluation of section f by d ps; started at the rising edge that
  // captures the instruction. The late value stays forced until the phase
  // after it was applied, so the result check one cycle later is not
  // disturbed by the release.
  task automatic inject(int f, int d);
    logic [7:0] vg, vp, vc;
    logic [XLEN-1:0] vm;
    case (f)
      0: begin
        #1 vg = dut.u_add.bg_f; vp = dut.u_add.bp_f;
        force dut.u_add.bg_f = '0; force dut.u_add.bp_f = '0;
        #(d - 1) force dut.u_add.bg_f = vg; force dut.u_add.bp_f = vp;
        @(negedge clk); @(negedge clk);
        release dut.u_add.bg_f; release dut.u_add.bp_f;
      end
      1: begin
        #1 vc = dut.u_add.c_f;
        force dut.u_add.c_f = '0;
        #(d - 1) force dut.u_add.c_f = vc;
        @(negedge clk); @(negedge clk);
        release dut.u_add.c_f;
      end
      default: begin
        @(negedge clk); #1 vm = dut.mux_y;
        force dut.mux_y = '0;
        #(d - 1) force dut.mux_y = vm;
        @(posedge clk); @(posedge clk);
        release dut.mux_y;
      end
    endcase
  endtask

  // one trial: returns 1 when the late evaluation shows in the result
  task automatic trial(bit test, int sec, int d, output bit caught);
    logic [XLEN-1:0] x, y;
    x = 32'hFFFF_FFFF; y = 32'h0000_0002;
    @(negedge clk);
    instr = test ? {1'b1, 2'b00, 2'(sec)} : {1'b0, OP_ADD};
    a = x; b = y;
    @(posedge clk);
    fork inject(sec, d); join_none
    @(posedge clk); #1;
    caught = ({cout, result} !== ({1'b0, x} + {1'b0, y}));
    repeat (3) @(posedge clk);
    disable fork;
    release dut.u_add.bg_f; release dut.u_add.bp_f;
    release dut.u_add.c_f; release dut.mux_y;
  endtask

  int win [3] = '{230, 390, 170};
  string cond_name [3] = '{"TEST 200 MHz", "NORMAL 200 MHz", "NORMAL 1.5 GHz"};

  initial begin
    rst_n = 1'b0; instr = '0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cond = 0; cond < 3; cond++) begin
      int thr_slow;
      half_ps = (cond == 2) ? 333 : 2500;
      repeat (2) @(posedge clk);
      if (cond == 0) begin               // warm-up: prime the parked delay chain
        @(negedge clk) instr = {1'b1, 4'b0000};
        repeat (2) @(posedge clk);
      end
      for (int sec = 0; sec < 3; sec++) begin
        int thr, dmax, first;
        thr  = (cond == 0) ? win[sec] : int'(half_ps);
        dmax = (cond == 2) ? 430 : 600;
        first = -1;
        for (int d = 15; d < dmax; d += 20) begin
          bit caught;
          trial(cond == 0, sec, d, caught);
          checks++;
          if (caught != (d > thr)) begin
            failures++;
            $display("FAIL %s section %0d late by %0d ps: caught=%0b", cond_name[cond], sec+1, d, caught);
          end
          if (caught && first < 0) first = d;
        end
        if (cond == 1) begin             // slow clock without windows: probe the half period
          foreach (thr_probe[i]) begin
            bit caught;
            trial(1'b0, sec, thr_probe[i], caught);
            checks++;
            if (caught != (thr_probe[i] > thr)) begin
              failures++;
              $display("FAIL %s section %0d late by %0d ps: caught=%0b", cond_name[cond], sec+1, thr_probe[i], caught);
            end
            if (caught && first < 0) first = thr_probe[i];
          end
        end
        $display("%-15s section %0d: smallest late evaluation caught %0d ps (expected just above %0d ps)",
                 cond_name[cond], sec+1, first, thr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int thr_probe [4] = '{2410, 2490, 2510, 2590};
endmodule
