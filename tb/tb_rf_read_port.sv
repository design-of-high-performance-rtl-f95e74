// tb_rf_read_port: fills the 64 x 32 array, then reads random entries one
// per cycle, interleaved with writes, against a reference array. A read
// address presented before the rising edge gives its data at the end of that
// clk=1 phase, held through the clk=0 phase.
module tb_rf_read_port;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  always #500 clk = ~clk;
  logic re, we;
  logic [5:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] ref_mem [64];
  int checks = 0, failures = 0;

  rf_read_port #(.ENTRIES(64), .WIDTH(32), .LBL_W(16)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 1'b0; we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] e;
      @(negedge clk);
      re = (n % 9 != 0);
      raddr = 6'($urandom);
      we = (n % 3 == 0);
      waddr = 6'($urandom);
      wdata = $urandom;
      // a write at the same edge lands before the read evaluates
      if (we) ref_mem[waddr] = wdata;
      e = re ? ref_mem[raddr] : 32'h0;
      @(negedge clk); #1;
      raddr = ~raddr;                     // address changes during precharge
      #100;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read %0d: %h vs %h", raddr, rdata, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
