// tb_bunch_disposition: checks the emulated LHC bunch pattern over whole
// orbits. The bunch-crossing number must count 0..3563 and wrap, with
// orbit_start only at slot 0. The proton map must hold 2808 bunches and
// the ion map 702; the layout is checked against the train description
// (72 filled, 8 empty between trains, 38 between injections, an abort gap
// of 122 at the end of the orbit; ions every 4th slot of a train).
`timescale 1ns/1ps
module tb_bunch_disposition;
  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic ion_mode = 0;
  logic [11:0] bx;
  logic filled, orbit_start;

  bunch_disposition dut (.clk(clk), .rst_n(rst_n), .ce(ce), .ion_mode(ion_mode),
                         .bx(bx), .filled(filled), .orbit_start(orbit_start));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference map from the train description, built independently
  bit ref_map [3564];
  task automatic build_ref(input int spacing);
    int inj [12] = '{3, 3, 4, 3, 3, 4, 3, 3, 4, 3, 3, 3};
    int pos = 0;
    foreach (ref_map[i]) ref_map[i] = 0;
    foreach (inj[i]) begin
      for (int t = 0; t < inj[i]; t++) begin
        for (int b = 0; b < 72; b += spacing) ref_map[pos + b] = 1;
        pos += 72;
        if (t != inj[i] - 1) pos += 8;
      end
      pos += 38;
    end
    // pos now includes one SPS gap after the last injection; the rest is abort gap
  endtask

  task automatic check_orbit(input string name, input int exp_bunches);
    int n_filled = 0, mismatches = 0, n_orbit = 0, last_filled = -1;
    @(posedge clk iff (ce && bx == 0));
    for (int i = 0; i < 3564; i++) begin
      // values sampled before the edge describe the cycle this ce closes
      if (bx != 12'(i)) mismatches++;
      if (filled != ref_map[i]) mismatches++;
      if (orbit_start != (i == 0)) mismatches++;
      if (filled) begin n_filled++; last_filled = i; end
      @(posedge clk iff ce);
    end
    check(bx == 0, $sformatf("%s: bunch counter wraps to 0 after 3563", name));
    check(mismatches == 0, $sformatf("%s: %0d slot mismatches", name, mismatches));
    check(n_filled == exp_bunches, $sformatf("%s: %0d bunches, expected %0d", name, n_filled, exp_bunches));
    check(3563 - last_filled >= 119, $sformatf("%s: abort gap %0d slots", name, 3563 - last_filled));
  endtask

  initial begin
    repeat (5) @(posedge clk); rst_n = 1;
    build_ref(1);
    check_orbit("proton", 2808);
    check_orbit("proton second orbit", 2808);
    ion_mode = 1;
    build_ref(4);
    @(posedge clk iff ce);
    check_orbit("ion", 702);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
