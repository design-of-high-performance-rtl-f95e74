// tb_alu_shifter: every distance 0..7 (6 and 7 clamp to 5) on random data.
module tb_alu_shifter;
  timeunit 1ps; timeprecision 1ps;

  logic [31:0] a, y;
  logic [2:0] shamt;
  int checks = 0, failures = 0;

  alu_shifter #(.W(32), .MAX_SH(5)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int n = 0; n < 800; n++) begin
      a = $urandom; shamt = 3'(n % 8);
      #10;
      e = a;
      for (int k = 0; k < ((n % 8) > 5 ? 5 : (n % 8)); k++) e = {e[30:0], 1'b0};
      checks++;
      if (y !== e) begin failures++; $display("FAIL a %h sh %0d y %h", a, shamt, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
