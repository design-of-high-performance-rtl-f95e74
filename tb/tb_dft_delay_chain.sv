// tb_dft_delay_chain: measures the delay and polarity of each test clock.
module tb_dft_delay_chain;
  timeunit 1ps; timeprecision 1ps;

  logic node_a, node_b, testclk1, testclk2, testclk3;
  int checks = 0, failures = 0;

  dft_delay_chain dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_at(int t, logic e1, logic e2, logic e3, string what);
    #(t);
    checks++;
    if ({testclk1, testclk2, testclk3} !== {e1, e2, e3}) begin
      failures++; $display("FAIL %s: %b%b%b", what, testclk1, testclk2, testclk3);
    end
  endtask

  initial begin
    node_a = 1'b0; node_b = 1'b1;   // clock low
    #1000;
    for (int n = 0; n < 20; n++) begin
      // rising node_a (CLK), falling node_b (CLKB) at the same time
      node_a = 1'b1; node_b = 1'b0;
      expect_at(1, 1'b1, 1'b1, 1'b0, "before");   // previous state: a was 0, b was 1
      expect_at(168, 1'b1, 1'b1, 1'b0, "169ps");
      expect_at(2, 1'b1, 1'b1, 1'b1, "171ps");
      expect_at(58, 1'b1, 1'b1, 1'b1, "229ps");
      expect_at(2, 1'b0, 1'b1, 1'b1, "231ps");
      expect_at(158, 1'b0, 1'b1, 1'b1, "389ps");
      expect_at(2, 1'b0, 1'b0, 1'b1, "391ps");
      #2109;
      node_a = 1'b0; node_b = 1'b1;
      expect_at(231, 1'b1, 1'b0, 1'b0, "fall 231ps");
      expect_at(160, 1'b1, 1'b1, 1'b0, "fall 391ps");
      #2109;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
