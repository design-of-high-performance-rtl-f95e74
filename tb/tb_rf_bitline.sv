// tb_rf_bitline: one bit-slice read path in both organisations (16-wide LBL /
// 2-wide GBL and 8-wide LBL / 4-wide GBL): the selected entry's bit during
// evaluation, 0 with no selection and 0 during precharge.
module tb_rf_bitline;
  timeunit 1ps; timeprecision 1ps;

  logic clk;
  logic [63:0] rs, d;
  logic q16, q8;
  int checks = 0, failures = 0;

  rf_bitline #(.ENTRIES(64), .LBL_W(16)) dut16 (.clk(clk), .rs(rs), .d(d), .q(q16));
  rf_bitline #(.ENTRIES(64), .LBL_W(8))  dut8  (.clk(clk), .rs(rs), .d(d), .q(q8));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int e;
      d = {$urandom, $urandom};
      e = $urandom_range(0, 64);                 // 64: nothing selected
      rs = (e == 64) ? 64'h0 : (64'h1 << e);
      clk = 1'b1;
      #10;
      checks++;
      if (q16 !== ((e == 64) ? 1'b0 : d[e]) || q8 !== q16) begin
        failures++; $display("FAIL eval entry %0d q16 %b q8 %b", e, q16, q8);
      end
      clk = 1'b0;                                // precharge pull-downs on S
      #10;
      checks++;
      if (q16 !== 1'b0 || q8 !== 1'b0) begin failures++; $display("FAIL precharge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
