// tb_ttc_encoder: checks the TTC-like bi-phase mark encoder by decoding it.
//
// Channels A and B get a random bit per 40.08 MHz period. The testbench
// samples the line once per 160.32 MHz clock, i.e. once per half cell, and
// decodes: every cell must begin with a transition, and a cell carries '1'
// when its two halves differ. The decoded A and B bits must equal what was
// driven (A first, then B, in every period). The line's running disparity
// must stay bounded (the code is DC-free). The pattern of the encoder
// figure, T1 = 1,0,0 with B = 1, must give cells 1 1 0 1 0 1.
`timescale 1ns/1ps
module tb_ttc_encoder;
  logic clk = 0, rst_n = 0;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;

  logic a = 0, b = 1;
  logic ttc_out;
  ttc_encoder dut (.clk(clk), .rst_n(rst_n), .phase(ph), .chan_a(a), .chan_b(b),
                   .ttc_out(ttc_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic prev_half;
    int disparity = 0, max_disp = 0;
    logic fig_bits [6];
    repeat (5) @(posedge clk); rst_n = 1;
    @(posedge clk iff ph == 3);
    #0.1 prev_half = ttc_out;   // last half cell before the test
    // the line shows half cell s after the clock edge of slot s
    for (int p = 0; p < 600; p++) begin
      logic ab, bb;
      logic h [4];
      if (p < 3) begin ab = (p == 0); bb = 1; end
      else begin ab = 1'($urandom_range(1)); bb = 1'($urandom_range(1)); end
      a = ab; b = bb;
      for (int s = 0; s < 4; s++) begin
        @(posedge clk); #0.1; h[s] = ttc_out;
        disparity += ttc_out ? 1 : -1;
        if (disparity > max_disp) max_disp = disparity;
        if (-disparity > max_disp) max_disp = -disparity;
      end
      check(h[0] != prev_half, $sformatf("period %0d: no transition at start of A cell", p));
      check(h[2] != h[1],      $sformatf("period %0d: no transition at start of B cell", p));
      check((h[0] != h[1]) == ab, $sformatf("period %0d: A decoded %0b, sent %0b", p, h[0] != h[1], ab));
      check((h[2] != h[3]) == bb, $sformatf("period %0d: B decoded %0b, sent %0b", p, h[2] != h[3], bb));
      if (p < 3) begin fig_bits[2*p] = (h[0] != h[1]); fig_bits[2*p+1] = (h[2] != h[3]); end
      prev_half = h[3];
    end
    check(fig_bits == '{1, 1, 0, 1, 0, 1}, "figure pattern T1=100, B=1 gives 110101");
    check(max_disp <= 4, $sformatf("running disparity reached %0d", max_disp));
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
