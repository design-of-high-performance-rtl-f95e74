// tb_alu32: self-checking testbench of the 32-bit delay-testable ALU.
//
// Issues random NORMAL-mode instructions back to back (one per cycle) and
// compares each result with a reference model one cycle after capture, which
// also checks the one-cycle execute latency. Then runs TEST mode with each
// section selected, checking A+B and the footer waveform, and injects a late
// evaluation into each adder section to show that only the tight window of
// the section under test catches it.
module tb_alu32;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned half_ps = 333;            // 1.5 GHz NORMAL clock
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
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN:0] model(logic [3:0] op, logic [XLEN-1:0] x, y, prev);
    case (op)
      OP_ADD:  return {1'b0, x} + {1'b0, y};
      OP_LOOP: return {1'b0, prev} + {1'b0, y};
      OP_INV:  return {1'b0, ~x};
      OP_AND:  return {1'b0, x & y};
      OP_OR:   return {1'b0, x | y};
      OP_XOR:  return {1'b0, x ^ y};
      OP_SHL1, OP_SHL2, OP_SHL3, OP_SHL4, OP_SHL5:
               return {1'b0, x << (op - OP_SHL1 + 1)};
      default: return '0;
    endcase
  endfunction

  task automatic check(string what, logic [XLEN:0] got, logic [XLEN:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // drive during the low phase, before the next rising edge
  task automatic issue(logic [INSTR_W-1:0] i, logic [XLEN-1:0] x, y);
    @(negedge clk);
    instr = i; a = x; b = y;
  endtask

  int detected [3] = '{0, 0, 0};

  // Sample the footers during the evaluation phase of the section under test.
  task automatic check_footer(int sec);
    int open_ps  [3] = '{100, 300, 100};
    int close_ps [3] = '{300, 450, 250};
    if (sec == 2) @(negedge clk);
    #(open_ps[sec]);
    checks++;
    if (footer !== 3'b111) begin failures++; $display("FAIL footer open %b", footer); end
    #(close_ps[sec] - open_ps[sec]);
    checks++;
    if (footer[sec] !== 1'b0 || footer != (3'b111 & ~(3'b1 << sec)) || sec_sel !== (3'b1 << sec)) begin
      failures++; $display("FAIL footer window sec%0d %b", sec+1, footer);
    end
  endtask

  // Emulate a delay fault: the section's logic value reaches its domino nodes
  // late (300/450/200 ps after its evaluation phase opens, just beyond the
  // 230/390/170 ps windows). Called right after the rising edge.
  task automatic inject(int f);
    logic [7:0] vg, vp, vc;
    logic [XLEN-1:0] vm;
    case (f)
      0: begin
        #1 vg = dut.u_add.bg_f; vp = dut.u_add.bp_f;
        force dut.u_add.bg_f = '0; force dut.u_add.bp_f = '0;
        #299 force dut.u_add.bg_f = vg; force dut.u_add.bp_f = vp;
        @(negedge clk) begin release dut.u_add.bg_f; release dut.u_add.bp_f; end
      end
      1: begin
        #1 vc = dut.u_add.c_f;
        force dut.u_add.c_f = '0;
        #449 force dut.u_add.c_f = vc;
        @(negedge clk) release dut.u_add.c_f;
      end
      default: begin
        @(negedge clk); #1 vm = dut.mux_y;
        force dut.mux_y = '0;
        #199 force dut.mux_y = vm;
        @(posedge clk) release dut.mux_y;
      end
    endcase
  endtask

  logic [XLEN:0] exp_q [$];
  logic [XLEN-1:0] prev;

  initial begin
    rst_n = 1'b0; instr = '0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // ---- NORMAL mode, pipelined ----
    prev = '0;
    // first instruction after reset: the loopback register holds the NOP result 0
    for (int n = 0; n < 400; n++) begin
      logic [3:0] op;
      logic [XLEN:0] e;
      logic [XLEN-1:0] x, y;
      op = 4'($urandom_range(0, 12));
      x = $urandom; y = $urandom;
      if (n % 7 == 0) begin x = 32'hFFFF_FFFF; y = 32'h1; end
      issue({1'b0, op}, x, y);
      @(posedge clk);            // captured here (E0)
      e = model(op, x, y, prev);
      prev = e[XLEN-1:0];
      @(posedge clk); #1;        // E1: result held by the output latch
      check($sformatf("op %0d %h %h", op, x, y), {cout, result}, e);
    end
    // back-to-back throughput: 50 instructions in 50 cycles
    begin
      int t0, t1;
      logic [XLEN:0] e;
      t0 = $time;
      fork
        begin
          for (int n = 0; n < 50; n++) begin
            logic [XLEN-1:0] x, y;
            x = $urandom; y = $urandom;
            @(negedge clk) begin instr = {1'b0, OP_XOR}; a = x; b = y; end
            exp_q.push_back({1'b0, x ^ y});
          end
        end
        begin
          @(posedge clk);
          for (int n = 0; n < 50; n++) begin
            @(posedge clk); #1;
            e = exp_q.pop_front();
            check("pipelined xor", {cout, result}, e);
          end
        end
      join
      t1 = $time;
      checks++;
      if ((t1 - t0) / (2 * half_ps) > 53) begin
        failures++;
        $display("FAIL throughput: %0d cycles for 50 instructions", (t1 - t0) / (2 * half_ps));
      end
    end
    // ---- TEST mode at a 5x slower clock (200 MHz) ----
    half_ps = 2500;
    repeat (2) @(posedge clk);
    // the delay chain is parked in NORMAL mode: the first TEST cycle warms it up
    issue({1'b1, 4'b0000}, 32'h0, 32'h0);
    for (int sec = 0; sec < 3; sec++) begin
      // footer waveform of the selected section, others held at 1
      issue({1'b1, 2'b00, 2'(sec)}, 32'hFFFF_FFFF, 32'h2);
      @(posedge clk);
      check_footer(sec);
      @(posedge clk); #1;
      check($sformatf("test sec%0d no fault", sec+1), {cout, result}, {1'b1, 32'h1});
      // a late-evaluating section f: caught only when f is the section under test
      for (int f = 0; f < 3; f++) begin
        issue({1'b1, 2'b00, 2'(sec)}, 32'hFFFF_FFFF, 32'h2);
        @(posedge clk);
        inject(f);
        if (f != 2) @(posedge clk);
        #1;
        checks++;
        if ((f == sec) != ({cout, result} !== {1'b1, 32'h1})) begin
          failures++;
          $display("FAIL diagnosis: fault in section %0d, section %0d under test, got %h",
                   f+1, sec+1, {cout, result});
        end
        if (f == sec) detected[f]++;
      end
    end
    // the same late evaluations in NORMAL mode at the slow clock go unnoticed
    for (int f = 0; f < 3; f++) begin
      issue({1'b0, OP_ADD}, 32'hFFFF_FFFF, 32'h2);
      @(posedge clk);
      inject(f);
      if (f != 2) @(posedge clk);
      #1;
      check($sformatf("normal mode, late section %0d", f+1), {cout, result}, {1'b1, 32'h1});
    end
    // reserved code: all footers stay on
    issue({1'b1, 4'b0011}, 32'h1234_5678, 32'h1111_1111);
    @(posedge clk); #300;
    checks++;
    if (footer !== 3'b111 || sec_sel !== 3'b000) begin
      failures++; $display("FAIL reserved code footers %b", footer);
    end
    @(posedge clk); #1;
    check("reserved code adds", {cout, result}, {1'b0, 32'h2345_6789});
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (detected[f] == 0) begin failures++; $display("FAIL section %0d fault never detected", f+1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
