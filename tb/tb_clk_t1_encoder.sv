// tb_clk_t1_encoder: checks the CLK+T1 line code.
//
// T1 is driven with a random bit per 40.08 MHz period, changing on the
// 40.08 MHz enable as it does in the design. For every period the
// testbench samples both outputs in all four 160.32 MHz slots: the plain
// clock must read 1,1 in the two slots after the phase counter's slots 0
// and 1 and 0 elsewhere (50 % duty), and the CLK+T1 output must equal it in
// a period whose T1 bit is 0 and stay low (pulse removed) when it is 1.
`timescale 1ns/1ps
module tb_clk_t1_encoder;
  logic clk = 0, rst_n = 0;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  logic t1 = 0;
  logic clk40_out, clk_t1_out;
  clk_t1_encoder dut (.clk(clk), .rst_n(rst_n), .phase(ph), .t1(t1),
                      .clk40_out(clk40_out), .clk_t1_out(clk_t1_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_removed = 0, n_kept = 0;
    repeat (5) @(posedge clk); rst_n = 1;
    @(posedge clk iff ph == 3);          // t1 changes with the ce40 edge
    for (int p = 0; p < 500; p++) begin
      logic bit_now;
      logic [3:0] c40, ct1;
      bit_now = (p < 20) ? p[0] : 1'($urandom_range(1));
      #0.1 t1 = bit_now;
      // outputs in the four slots of this period appear one clock late
      for (int s = 0; s < 4; s++) begin
        @(posedge clk); #0.1;
        c40[s] = clk40_out; ct1[s] = clk_t1_out;
      end
      // slots sampled after edges with phase 0..3: clock high after 0 and 1
      check(c40 == 4'b0011, $sformatf("period %0d: clock slots %b", p, c40));
      if (bit_now) begin
        check(ct1 == 4'b0000, $sformatf("period %0d: T1=1 but CLK+T1 %b", p, ct1));
        n_removed++;
      end else begin
        check(ct1 == 4'b0011, $sformatf("period %0d: T1=0 but CLK+T1 %b", p, ct1));
        n_kept++;
      end
    end
    check(n_removed > 100 && n_kept > 100, "both T1 values exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
