// tb_alu_decoder: checks the decoded control word of every instruction
// against an independently written table.
module tb_alu_decoder;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  logic [INSTR_W-1:0] instr;
  alu_ctrl_t ctrl;
  int checks = 0, failures = 0;

  alu_decoder dut (.instr(instr), .ctrl(ctrl));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_normal = 0, n_test = 0;
    for (int i = 0; i < 32; i++) begin
      logic [2:0] sel;
      instr = 5'(i);
      #10;
      sel = {ctrl.sel_shift, ctrl.sel_logic, ctrl.sel_add};
      checks++;
      if (i >= 16) begin
        // TEST: add only, CTRL bits passed through
        if (!(ctrl.tn && ctrl.ctrl == 2'(i) && ctrl.arith_en && !ctrl.ls_en &&
              sel == 3'b001 && !ctrl.loopback)) begin
          failures++; $display("FAIL test instr %0d", i);
        end
        if ((i & 12) == 0) n_test++;
      end else if (i <= 1) begin
        if (!(sel == 3'b001 && ctrl.arith_en && !ctrl.ls_en && !ctrl.tn &&
              ctrl.loopback == (i == 1))) begin
          failures++; $display("FAIL add/loop instr %0d", i);
        end
        n_normal++;
      end else if (i <= 5) begin
        if (!(sel == 3'b010 && ctrl.ls_en && !ctrl.arith_en && int'(ctrl.lu_fn) == i - 2)) begin
          failures++; $display("FAIL logic instr %0d", i);
        end
        n_normal++;
      end else if (i <= 10) begin
        if (!(sel == 3'b100 && ctrl.ls_en && !ctrl.arith_en && int'(ctrl.shamt) == i - 5)) begin
          failures++; $display("FAIL shift instr %0d", i);
        end
        n_normal++;
      end else begin
        if (ctrl !== '0) begin failures++; $display("FAIL nop instr %0d", i); end
      end
    end
    checks++;
    if (n_normal + n_test != 15) begin failures++; $display("FAIL instruction count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
