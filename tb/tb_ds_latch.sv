// tb_ds_latch: checks that the latch is transparent in its phase and holds
// in the other, for both phase settings.
module tb_ds_latch;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  logic [7:0] d, qh, ql;
  int checks = 0, failures = 0;

  ds_latch #(.W(8), .TRANSPARENT_HIGH(1'b1)) dut_h (.clk(clk), .d(d), .q(qh));
  ds_latch #(.W(8), .TRANSPARENT_HIGH(1'b0)) dut_l (.clk(clk), .d(d), .q(ql));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held_h, held_l;
    d = 8'h00;
    for (int n = 0; n < 100; n++) begin
      clk = 1'b1; d = 8'($urandom); #5;
      checks++; if (qh !== d) begin failures++; $display("FAIL high transparent"); end
      held_h = d; held_l = ql;
      d = 8'($urandom); #5;
      checks++; if (qh !== d || ql !== held_l) begin failures++; $display("FAIL phase high"); end
      held_h = d;
      clk = 1'b0; #1; d = 8'($urandom); #5;
      checks++; if (qh !== held_h || ql !== d) begin failures++; $display("FAIL phase low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
