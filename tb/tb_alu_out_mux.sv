// tb_alu_out_mux: each one-hot select passes its input; no select gives 0.
module tb_alu_out_mux;
  timeunit 1ps; timeprecision 1ps;

  logic [2:0] sel;
  logic [2:0][31:0] d;
  logic [31:0] y;
  int checks = 0, failures = 0;

  alu_out_mux #(.W(32), .N(3)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      d[0] = $urandom; d[1] = $urandom; d[2] = $urandom;
      sel = (n % 4 == 3) ? 3'b000 : 3'(1 << (n % 4));
      #10;
      checks++;
      if (y !== ((n % 4 == 3) ? 32'h0 : d[n % 4])) begin
        failures++; $display("FAIL sel %b y %h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
