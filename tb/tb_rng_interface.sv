// tb_rng_interface: checks the random-interval measurement.
//
// The comparator input is driven with short pulses whose rising edges fall
// at chosen 40.08 MHz cycles, a little after the cycle starts and at
// varying offsets inside it; the measured values must equal the differences
// of those cycle numbers. The first edge only arms the counter. An edge
// closer than 3 cycles to the previous accepted one must be ignored and
// counted. Values not taken before the next one arrives must be counted as
// overruns. Finally a long run of exponentially distributed intervals
// (mean 40 cycles) is measured and the sum of the values compared.
`timescale 1ns/1ps
module tb_rng_interface;
  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic enable = 0, gate_in = 0, rnd_pop = 0;
  logic rnd_valid;
  logic [31:0] rnd_value, overruns, short_edges;

  rng_interface dut (.clk(clk), .rst_n(rst_n), .ce(ce), .enable(enable), .gate_in(gate_in),
                     .rnd_valid(rnd_valid), .rnd_value(rnd_value), .rnd_pop(rnd_pop),
                     .overruns(overruns), .short_edges(short_edges));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned n40 = 0;
  always @(posedge clk) if (ce) n40 <= n40 + 1;

  // consumer: pops every value when auto_pop is set, records it
  bit auto_pop = 1;
  int unsigned got[$];
  always @(negedge clk) rnd_pop = auto_pop && rnd_valid && ph == 3;
  always @(posedge clk) if (ce && rnd_pop) got.push_back(rnd_value);

  // rising edge in 40.08 MHz cycle c, in the first 160.32 MHz slot
  task automatic pulse_at(input int unsigned c);
    wait (n40 == c);
    @(posedge clk iff ph == 0);
    #(0.5 + $urandom_range(40) / 10.0) gate_in = 1;
    #10 gate_in = 0;
  endtask

  initial begin
    int unsigned t[$];
    int unsigned e[$];
    repeat (5) @(posedge clk); rst_n = 1;
    enable = 1;
    repeat (10) @(posedge clk);

    // directed intervals 5, 3, 17, 4, and a short one (2) that is ignored
    t = '{20, 25, 28, 45, 47, 49};   // 47 is 2 after 45 -> ignored; 49 is 4 after 45
    foreach (t[i]) pulse_at(t[i]);
    repeat (20) @(posedge clk);
    e = '{5, 3, 17, 4};
    check(got.size() == e.size(), $sformatf("%0d values, expected %0d", got.size(), e.size()));
    foreach (e[i]) if (i < got.size())
      check(got[i] == e[i], $sformatf("value %0d is %0d, expected %0d", i, got[i], e[i]));
    check(short_edges == 1, $sformatf("%0d short edges, expected 1", short_edges));
    check(overruns == 0, "no overrun while values are taken");

    // overrun: two values measured without a pop
    auto_pop = 0;
    pulse_at(n40 + 10);
    pulse_at(n40 + 10);
    repeat (20) @(posedge clk);
    check(rnd_valid, "value held while not taken");
    check(overruns == 1, $sformatf("%0d overruns, expected 1", overruns));
    check(rnd_value == 10, $sformatf("held value %0d, newest expected (10)", rnd_value));
    auto_pop = 1;
    repeat (8) @(posedge clk);
    check(!rnd_valid, "pop empties the holding register");

    // disable: edges ignored, re-enable re-arms
    got.delete();
    enable = 0;
    pulse_at(n40 + 5); pulse_at(n40 + 7);
    repeat (20) @(posedge clk);
    check(got.size() == 0, "no values while disabled");
    enable = 1;
    pulse_at(n40 + 5); pulse_at(n40 + 9);
    repeat (20) @(posedge clk);
    check(got.size() == 1 && got[0] == 9, "first edge after enable only arms the counter");

    // exponential intervals, mean 40 cycles, at least 3
    begin
      longint sum_sent = 0, sum_got = 0;
      int unsigned c;
      got.delete();
      c = n40 + 5;
      pulse_at(c);
      repeat (9) @(posedge clk);
      got.delete();                // value ending at c belongs to the earlier part
      for (int i = 0; i < 300; i++) begin
        int unsigned d;
        real u;
        u = ($urandom_range(1000000) + 1) / 1000001.0;
        d = 3 + int'(-37.0 * $ln(u));
        c += d; sum_sent += d;
        pulse_at(c);
      end
      repeat (20) @(posedge clk);
      foreach (got[i]) sum_got += got[i];
      check(got.size() == 300, $sformatf("%0d random values, expected 300", got.size()));
      check(sum_got == sum_sent, $sformatf("sum of values %0d, of intervals %0d", sum_got, sum_sent));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
