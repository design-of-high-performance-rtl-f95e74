// tb_cdl_stage: the evaluation-window experiment on one domino section.
//
// A section whose logic value arrives d ps after the evaluation phase opens
// is sampled at the end of the phase. With the footer held on (no DFT) it
// fails only when d exceeds the whole phase; with a 230 ps footer window it
// fails as soon as d exceeds the window. Also checks precharge to 0, and
// the same for a section that evaluates while clk=0.
module tb_cdl_stage;
  timeunit 1ps; timeprecision 1ps;

  localparam int HALF = 2500;   // 200 MHz test clock
  localparam int WIN  = 230;    // evaluation window

  logic clk = 1'b0;
  logic footer_h, footer_l;
  logic [7:0] f, qh, ql;
  int checks = 0, failures = 0;

  cdl_stage #(.W(8), .EVAL_HIGH(1'b1)) dut_h (.clk(clk), .footer(footer_h), .f(f), .q(qh));
  cdl_stage #(.W(8), .EVAL_HIGH(1'b0)) dut_l (.clk(clk), .footer(footer_l), .f(f), .q(ql));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one evaluation phase with a value arriving d ps late; returns the
  // value held at the end of the phase
  task automatic phase(bit high, bit dft, int d, logic [7:0] v, output logic [7:0] got);
    f = 8'h00;
    if (high) footer_h = 1'b1; else footer_l = 1'b1;
    clk = high;
    fork
      begin #(d) f = v; end
      begin if (dft) begin #(WIN) if (high) footer_h = 1'b0; else footer_l = 1'b0; end end
    join_none
    #(HALF - 1);
    got = high ? qh : ql;
    #1;
    disable fork;
  endtask

  initial begin
    logic [7:0] got, v;
    int ok_dft, ok_nodft;
    footer_h = 1'b1; footer_l = 1'b1; f = '0;
    clk = 1'b1; #10 clk = 1'b0; #10;
    for (int hi = 0; hi < 2; hi++) begin
      for (int d = 50; d < 3200; d += 100) begin
        v = 8'($urandom_range(1, 255));
        phase(hi[0], 1'b1, d, v, got);
        ok_dft = (got === v);
        // precharge in the other phase
        clk = ~clk; #5;
        checks++;
        if ((hi ? qh : ql) !== 8'h00) begin failures++; $display("FAIL precharge"); end
        #(HALF - 5);
        phase(hi[0], 1'b0, d, v, got);
        ok_nodft = (got === v);
        clk = ~clk; #(HALF);
        checks++;
        if (ok_dft != (d < WIN)) begin
          failures++; $display("FAIL window: eval_high=%0d d=%0d ok=%0d", hi, d, ok_dft);
        end
        checks++;
        if (ok_nodft != (d < HALF)) begin
          failures++; $display("FAIL no window: eval_high=%0d d=%0d ok=%0d", hi, d, ok_nodft);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
