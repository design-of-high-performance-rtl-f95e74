// tb_datapath_top: end-to-end test of the whole design at its default sizes.
//
// ALU: a random instruction stream in NORMAL mode at 1.5 GHz (every opcode,
// loopback chains, back-to-back issue), a switch to TEST mode at 200 MHz with
// each section under test in turn and a late evaluation injected into each
// section (diagnosis: only the section under test may catch it), the
// reserved TEST code, and a switch back to NORMAL mode. Counts how often
// each mechanism happened (unit clock gated off, loopback, each TEST
// section, each fault caught, mode switches) and fails any that never did.
// RF: fills the array and reads it back one read per cycle, with writes to
// the entry being read and disabled reads mixed in.
module tb_datapath_top;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  // ---------------- clocks ----------------
  int unsigned half_ps = 333;                 // ALU: 1.5 GHz NORMAL
  logic alu_clk = 1'b0;
  always #(half_ps) alu_clk = ~alu_clk;
  logic rf_clk = 1'b0;
  always #500 rf_clk = ~rf_clk;               // RF: 1 GHz

  logic               alu_rst_n;
  logic [INSTR_W-1:0] alu_instr;
  logic [XLEN-1:0]    alu_a, alu_b, alu_result;
  logic               alu_cout, alu_arith_clk, alu_ls_clk;
  logic [2:0]         alu_footer, alu_sec_sel;
  logic               rf_re, rf_we;
  logic [5:0]         rf_raddr, rf_waddr;
  logic [31:0]        rf_rdata, rf_wdata;

  datapath_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {M_ADD, M_LOOP, M_LOGIC, M_SHIFT, M_NOP, M_ARITH_GATED, M_LS_GATED,
                    M_TO_TEST, M_TO_NORMAL, M_SEC1, M_SEC2, M_SEC3, M_CAUGHT1,
                    M_CAUGHT2, M_CAUGHT3, M_RESERVED, M_RF_READ, M_RF_WRITE,
                    M_RF_RAW, M_RF_IDLE, M_N} mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"add", "loopback", "logic", "shift", "nop",
    "arith clock gated", "logic-shift clock gated", "NORMAL->TEST", "TEST->NORMAL",
    "section 1 test", "section 2 test", "section 3 test", "section 1 fault caught",
    "section 2 fault caught", "section 3 fault caught", "reserved code",
    "rf read", "rf write", "rf read of entry written same edge", "rf read disabled"};

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [XLEN:0] got, logic [XLEN:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // count gated-off unit clock cycles
  always @(posedge alu_clk) begin
    #1;
    if (alu_rst_n && !alu_arith_clk) mech[M_ARITH_GATED]++;
    if (alu_rst_n && !alu_ls_clk)    mech[M_LS_GATED]++;
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

  // late evaluation of one ALU section (see tb_alu32); called after a rising
  // edge; returns after the following rising edge for section 3 and after
  // the falling edge otherwise
  task automatic inject(int f);
    logic [7:0] vg, vp, vc;
    logic [XLEN-1:0] vm;
    case (f)
      0: begin
        #1 vg = dut.u_alu.u_add.bg_f; vp = dut.u_alu.u_add.bp_f;
        force dut.u_alu.u_add.bg_f = '0; force dut.u_alu.u_add.bp_f = '0;
        #299 force dut.u_alu.u_add.bg_f = vg; force dut.u_alu.u_add.bp_f = vp;
        @(negedge alu_clk) begin release dut.u_alu.u_add.bg_f; release dut.u_alu.u_add.bp_f; end
      end
      1: begin
        #1 vc = dut.u_alu.u_add.c_f;
        force dut.u_alu.u_add.c_f = '0;
        #449 force dut.u_alu.u_add.c_f = vc;
        @(negedge alu_clk) release dut.u_alu.u_add.c_f;
      end
      default: begin
        @(negedge alu_clk); #1 vm = dut.u_alu.mux_y;
        force dut.u_alu.mux_y = '0;
        #199 force dut.u_alu.mux_y = vm;
        @(posedge alu_clk) release dut.u_alu.mux_y;
      end
    endcase
  endtask

  task automatic issue(logic [INSTR_W-1:0] i, logic [XLEN-1:0] x, y);
    @(negedge alu_clk);
    alu_instr = i; alu_a = x; alu_b = y;
  endtask

  // ---------------- ALU ----------------
  logic [XLEN:0] exp_q [$];
  bit alu_done = 0, rf_done = 0;

  task automatic normal_stream(int count);
    // pipelined: issue every cycle, check each result one cycle later
    logic [XLEN-1:0] prev;
    prev = alu_result;
    fork
      begin
        for (int n = 0; n < count; n++) begin
          logic [3:0] op;
          logic [XLEN-1:0] x, y;
          logic [XLEN:0] e;
          op = 4'($urandom_range(0, 12));
          if (n % 5 == 1) op = OP_LOOP;
          x = $urandom; y = $urandom;
          if (n % 11 == 0) begin x = 32'hFFFF_FFFF; y = 32'h1; end
          issue({1'b0, op}, x, y);
          e = model(op, x, y, prev);
          prev = e[XLEN-1:0];
          exp_q.push_back(e);
          case (op)
            OP_ADD: mech[M_ADD]++;
            OP_LOOP: mech[M_LOOP]++;
            OP_INV, OP_AND, OP_OR, OP_XOR: mech[M_LOGIC]++;
            OP_SHL1, OP_SHL2, OP_SHL3, OP_SHL4, OP_SHL5: mech[M_SHIFT]++;
            default: mech[M_NOP]++;
          endcase
        end
      end
      begin
        @(posedge alu_clk);
        for (int n = 0; n < count; n++) begin
          @(posedge alu_clk); #1;
          check($sformatf("normal stream %0d", n), {alu_cout, alu_result}, exp_q.pop_front());
        end
      end
    join
  endtask

  initial begin
    alu_rst_n = 1'b0; alu_instr = '0; alu_a = '0; alu_b = '0;
    repeat (3) @(posedge alu_clk);
    @(negedge alu_clk) alu_rst_n = 1'b1;
    @(posedge alu_clk); #1;
    check("reset result", {alu_cout, alu_result}, '0);
    normal_stream(500);
    // ---- NORMAL -> TEST, slower clock ----
    half_ps = 2500;
    mech[M_TO_TEST]++;
    issue({1'b1, 4'b0000}, 32'h0, 32'h0);    // warms up the parked delay chain
    for (int sec = 0; sec < 3; sec++) begin
      for (int f = -1; f < 3; f++) begin
        logic [XLEN-1:0] x, y;
        logic [XLEN:0] e;
        bit bad;
        x = 32'hFFFF_FFFF; y = 32'h2;
        e = {1'b0, x} + {1'b0, y};
        issue({1'b1, 2'b00, 2'(sec)}, x, y);
        @(posedge alu_clk);
        checks++;
        if (alu_sec_sel !== 3'(1 << sec)) begin failures++; $display("FAIL sec_sel %b", alu_sec_sel); end
        if (f >= 0) inject(f);
        if (f != 2) @(posedge alu_clk);
        #1;
        bad = ({alu_cout, alu_result} !== e);
        checks++;
        if (bad != (f == sec)) begin
          failures++;
          $display("FAIL diagnosis: late section %0d, section %0d under test, got %h", f+1, sec+1,
                   {alu_cout, alu_result});
        end
        if (f < 0 && !bad) mech[M_SEC1 + sec]++;
        if (f == sec && bad) mech[M_CAUGHT1 + sec]++;
      end
    end
    issue({1'b1, 4'b0011}, 32'h0F0F_0F0F, 32'h0101_0101);
    @(posedge alu_clk); #300;
    checks++;
    if (alu_footer !== 3'b111) begin failures++; $display("FAIL reserved footers"); end
    @(posedge alu_clk); #1;
    check("reserved adds", {alu_cout, alu_result}, {1'b0, 32'h1010_1010});
    mech[M_RESERVED]++;
    // ---- TEST -> NORMAL ----
    issue({1'b0, OP_ADD}, 32'h7, 32'h8);
    @(posedge alu_clk);
    half_ps = 333;
    @(posedge alu_clk); #1;
    check("back to normal", {alu_cout, alu_result}, {1'b0, 32'hF});
    checks++;
    if (alu_footer !== 3'b111) begin failures++; $display("FAIL normal footers"); end
    mech[M_TO_NORMAL]++;
    normal_stream(200);
    alu_done = 1;
  end

  // ---------------- register file ----------------
  logic [31:0] ref_mem [64];

  initial begin
    rf_re = 1'b0; rf_we = 1'b0; rf_raddr = '0; rf_waddr = '0; rf_wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge rf_clk);
      rf_we = 1'b1; rf_waddr = 6'(i); rf_wdata = $urandom; ref_mem[i] = rf_wdata;
      mech[M_RF_WRITE]++;
    end
    @(negedge rf_clk) rf_we = 1'b0;
    for (int n = 0; n < 600; n++) begin
      logic [31:0] e;
      @(negedge rf_clk);
      rf_re = (n % 13 != 5);
      rf_raddr = 6'($urandom);
      rf_we = (n % 4 == 0);
      rf_waddr = (n % 8 == 0) ? rf_raddr : 6'($urandom);
      rf_wdata = $urandom;
      if (rf_we) begin ref_mem[rf_waddr] = rf_wdata; mech[M_RF_WRITE]++; end
      if (rf_we && rf_re && rf_waddr == rf_raddr) mech[M_RF_RAW]++;
      if (rf_re) mech[M_RF_READ]++; else mech[M_RF_IDLE]++;
      e = rf_re ? ref_mem[rf_raddr] : 32'h0;
      @(posedge rf_clk); #400;            // end of the evaluation phase
      checks++;
      if (rf_rdata !== e) begin failures++; $display("FAIL rf read %0d: %h vs %h", rf_raddr, rf_rdata, e); end
    end
    rf_done = 1;
  end

  initial begin
    wait (alu_done && rf_done);
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-36s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
