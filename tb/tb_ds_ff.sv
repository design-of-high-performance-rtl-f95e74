// tb_ds_ff: checks edge-triggered behaviour of the master-slave flip-flop:
// q takes d at each rising edge and ignores d changes in either phase.
module tb_ds_ff;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  ds_ff #(.W(16)) dut (.clk(clk), .d(d), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    d = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); #2 d = 16'($urandom);
      exp = d;
      @(posedge clk); #1;
      checks++; if (q !== exp) begin failures++; $display("FAIL capture"); end
      d = 16'($urandom); #2;          // change while clk=1
      checks++; if (q !== exp) begin failures++; $display("FAIL hold high"); end
      @(negedge clk); #1 d = ~d; #1;  // change while clk=0
      checks++; if (q !== exp) begin failures++; $display("FAIL hold low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
