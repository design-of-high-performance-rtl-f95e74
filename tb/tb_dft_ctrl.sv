// tb_dft_ctrl: the mode/section truth table and both multiplexer stages.
module tb_dft_ctrl;
  timeunit 1ps; timeprecision 1ps;

  logic clk, tn, ctrl1, ctrl2, testclk1, testclk2, testclk3;
  logic node_a, node_b, stress;
  logic [2:0] footer, sec_sel;
  int checks = 0, failures = 0;

  dft_ctrl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [2:0] es, ef;
      {clk, tn, ctrl1, ctrl2, testclk1, testclk2, testclk3} = 7'(n);
      #10;
      es = !tn ? 3'b000 : ({ctrl1, ctrl2} == 2'b00) ? 3'b001 :
           ({ctrl1, ctrl2} == 2'b01) ? 3'b010 : ({ctrl1, ctrl2} == 2'b10) ? 3'b100 : 3'b000;
      ef = {es[2] ? testclk3 : 1'b1, es[1] ? testclk2 : 1'b1, es[0] ? testclk1 : 1'b1};
      checks++;
      if (sec_sel !== es || footer !== ef || stress !== (tn && ctrl1 && ctrl2)) begin
        failures++; $display("FAIL n=%0d sel %b footer %b", n, sec_sel, footer);
      end
      checks++;
      if (node_a !== (tn ? clk : 1'b1) || node_b !== (tn ? ~clk : 1'b1)) begin
        failures++; $display("FAIL input mux n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
