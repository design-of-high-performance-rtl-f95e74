// tb_rf_decoder: every address with enable on and off.
module tb_rf_decoder;
  timeunit 1ps; timeprecision 1ps;

  logic en;
  logic [5:0] addr;
  logic [63:0] sel;
  int checks = 0, failures = 0;

  rf_decoder #(.AW(6)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 128; n++) begin
      en = n[6]; addr = 6'(n);
      #10;
      checks++;
      if (sel !== (en ? (64'h1 << addr) : 64'h0)) begin failures++; $display("FAIL %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
