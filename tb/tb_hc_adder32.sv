// tb_hc_adder32: random and corner-case additions with a free-running clock,
// compared with a 33-bit sum; then cycles with section 1 or 2 blocked by
// an early-closed footer, where every carry between blocks must be lost.
module tb_hc_adder32;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  always #500 clk = ~clk;
  logic footer1, footer2, cout;
  logic [31:0] a, b, sum;
  int checks = 0, failures = 0;

  hc_adder32 #(.W(32), .BLK(4)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sum with no carry between 4-bit blocks
  function automatic logic [32:0] blockwise(logic [31:0] x, y);
    logic [31:0] s;
    for (int k = 0; k < 8; k++) s[k*4 +: 4] = x[k*4 +: 4] + y[k*4 +: 4];
    return {1'b0, s};
  endfunction

  initial begin
    logic [32:0] e;
    footer1 = 1'b1; footer2 = 1'b1; a = '0; b = '0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      case (n % 10)
        0: begin a = 32'hFFFF_FFFF; b = 32'h1; end
        1: begin a = $urandom; b = ~a; end
        2: begin a = $urandom; b = -a; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      @(negedge clk); #400;   // late in the clk=0 phase
      e = {1'b0, a} + {1'b0, b};
      checks++;
      if ({cout, sum} !== e) begin failures++; $display("FAIL %h + %h = %h", a, b, {cout, sum}); end
    end
    // blocked sections: the footer is off for the whole evaluation phase
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      footer1 = n[0]; footer2 = ~n[0];
      a = $urandom; b = $urandom;
      @(negedge clk); #400;
      checks++;
      if ({cout, sum} !== blockwise(a, b)) begin
        failures++; $display("FAIL blocked %h + %h = %h", a, b, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
