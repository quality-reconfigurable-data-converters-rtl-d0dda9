// tb_adc_sampling_ff -- self-checking test of the ADC over-sampling flip-flop.
//
// Drives random comparator levels and checks after each clock edge that the
// bitstream output holds the level sampled at that edge and that the feedback
// output is its complement; levels that change between edges must not leak
// through.  It also checks the reset value (bitstream 0, feedback 1).
`timescale 1ns/1ps
module tb_adc_sampling_ff;
  logic clk = 0, rst_n = 0, comp_in = 0;
  logic q, q_n;
  int checks = 0, failures = 0;

  adc_sampling_ff dut (.clk(clk), .rst_n(rst_n), .comp_in(comp_in), .q(q), .q_n(q_n));

  always #122 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    comp_in = 1;
    @(posedge clk); #1;
    check(q == 0 && q_n == 1, "reset value");
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic sampled;
      sampled = 1'($urandom_range(0, 1));
      comp_in = sampled;
      @(posedge clk);
      #1;
      check(q == sampled, "q holds sampled level");
      check(q_n == ~sampled, "q_n is the complement");
      comp_in = ~sampled;       // glitch between edges
      #50;
      check(q == sampled, "q stable between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
