// tb_clock_phase: checks that clock_phase counts the four 160.32 MHz slots
// of each 40.08 MHz period, raises ce40 only in slot 3 (one in four clocks)
// and restarts at slot 0 after reset.
`timescale 1ns/1ps
module tb_clock_phase;
  logic clk = 0, rst_n = 0;
  logic [1:0] phase;
  logic ce40;
  always #3.12 clk = ~clk;

  clock_phase dut (.clk(clk), .rst_n(rst_n), .phase(phase), .ce40(ce40));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_ce;
    int unsigned expect_phase;
    repeat (3) @(posedge clk);
    #1 check(phase == 0, "phase held at 0 in reset");
    rst_n = 1;
    expect_phase = 0;
    n_ce = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      check(phase == 2'(expect_phase), $sformatf("cycle %0d: phase %0d, expected %0d", i, phase, expect_phase));
      check(ce40 == (expect_phase == 3), $sformatf("cycle %0d: ce40 %0b in slot %0d", i, ce40, expect_phase));
      if (ce40) n_ce++;
      expect_phase = (expect_phase + 1) % 4;
    end
    check(n_ce == 100, $sformatf("%0d ce40 in 400 clocks, expected 100", n_ce));
    // reset in mid-period restarts at slot 0
    @(negedge clk iff phase == 2);
    rst_n = 0; #1;
    check(phase == 0, "asynchronous reset clears the phase");
    @(negedge clk); rst_n = 1;
    @(negedge clk); check(phase == 1, "counting resumes from slot 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
