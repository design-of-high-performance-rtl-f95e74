// tb_alu_input_stage: checks that each bank loads A/B only in cycles whose
// enable is set, holds otherwise, and that the gated clocks pulse only then.
module tb_alu_input_stage;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic arith_en, ls_en, arith_clk, ls_clk;
  logic [31:0] a, b, a_arith, b_arith, a_ls, b_ls;
  int checks = 0, failures = 0;
  int pulses_ar = 0, pulses_ls = 0;

  alu_input_stage #(.W(32)) dut (.*);

  always @(posedge arith_clk) pulses_ar++;
  always @(posedge ls_clk) pulses_ls++;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb, la, lb;
    int en_ar = 1, en_ls = 1;   // the edge before the first loop cycle has both enabled
    arith_en = 1'b1; ls_en = 1'b1; a = '0; b = '0;
    @(posedge clk);
    @(negedge clk);
    pulses_ar = 0; pulses_ls = 0;
    ea = a_arith; eb = b_arith; la = a_ls; lb = b_ls;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      arith_en = 1'($urandom); ls_en = 1'($urandom);
      a = $urandom; b = $urandom;
      if (arith_en) begin ea = a; eb = b; en_ar++; end
      if (ls_en)    begin la = a; lb = b; en_ls++; end
      @(posedge clk); #1;
      checks++;
      if (a_arith !== ea || b_arith !== eb || a_ls !== la || b_ls !== lb) begin
        failures++; $display("FAIL cycle %0d", n);
      end
    end
    @(negedge clk);
    checks++;
    if (pulses_ar != en_ar || pulses_ls != en_ls) begin
      failures++; $display("FAIL gated clock pulses %0d/%0d %0d/%0d", pulses_ar, en_ar, pulses_ls, en_ls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
