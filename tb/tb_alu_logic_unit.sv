// tb_alu_logic_unit: random operands through every function, compared
// with the SystemVerilog operators.
module tb_alu_logic_unit;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  logic [31:0] a, b, y;
  lu_fn_e fn;
  int checks = 0, failures = 0;

  alu_logic_unit #(.W(32)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = $urandom; fn = lu_fn_e'(n % 4);
      #10;
      case (n % 4)
        0: e = ~a;
        1: e = a & b;
        2: e = a | b;
        default: e = a ^ b;
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL fn %0d a %h b %h y %h", n % 4, a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
