// tb_burst_stage: self-checking test of burst_stage with its interval RAM.
//
// A 16-entry RAM keeps the runs short. The testbench writes interval lists,
// starts the stage and records the 40.08 MHz cycle of every pulse. The
// expected cycles are the running sums of the written intervals, counted
// from the cycle in which start was sampled. Cases: a short list ended by a
// zero, a list ended by an illegal value (2), a full list of DEPTH entries,
// an empty list, a stop in mid-burst and a restart after the stop.
`timescale 1ns/1ps
module tb_burst_stage;
  localparam int DEPTH = 16;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic          we = 0;
  logic [AW-1:0] waddr = 0, raddr;
  logic [31:0]   wdata = 0, rdata;
  logic          start = 0, stop = 0;
  logic          pulse, busy;

  interval_ram #(.DEPTH(DEPTH), .WIDTH(32)) u_ram (
    .clk(clk), .we(we), .addr_a(waddr), .wdata(wdata), .rdata_a(), .raddr(raddr),
    .rdata(rdata));
  burst_stage #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .start(start), .stop(stop),
    .ram_raddr(raddr), .ram_rdata(rdata), .pulse(pulse), .busy(busy));

  int checks = 0, failures = 0;
  int unsigned n40 = 0;           // 40.08 MHz cycle number
  int unsigned start_cycle;
  int unsigned pulses[$];

  // every ce edge: record pulses seen in the cycle that this edge closes
  always @(posedge clk) if (ce) begin
    if (pulse) pulses.push_back(n40);
    n40 <= n40 + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_ce(); @(posedge clk iff ce); endtask

  task automatic write_list(input int unsigned v[$]);
    foreach (v[i]) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = v[i];
    end
    @(negedge clk); we = 0;
  endtask

  // start in the next 40.08 MHz cycle; start_cycle = cycle that samples it
  task automatic do_start();
    pulses.delete();
    @(negedge clk iff ph == 0); start = 1;
    start_cycle = n40;
    wait_ce(); #0.1 start = 0;
  endtask

  task automatic expect_pulses(input int unsigned iv[$], input string name);
    int unsigned t;
    t = start_cycle;
    check(pulses.size() == iv.size(),
          $sformatf("%s: %0d pulses, expected %0d", name, pulses.size(), iv.size()));
    foreach (iv[i]) begin
      t += iv[i];
      if (i < pulses.size())
        check(pulses[i] == t, $sformatf("%s: pulse %0d at %0d, expected %0d",
                                        name, i + 1, pulses[i] - start_cycle, t - start_cycle));
    end
  endtask

  task automatic wait_idle(input int max_cycles);
    int k = 0;
    wait_ce();
    while (busy && k < max_cycles) begin wait_ce(); k++; end
    repeat (3) wait_ce();
  endtask

  initial begin
    int unsigned v[$], e[$];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (8) wait_ce();

    // 1: list ended by zero
    v = '{5, 3, 7, 4, 0};
    write_list(v);
    do_start(); wait_idle(200);
    e = '{5, 3, 7, 4};
    expect_pulses(e, "zero-ended");

    // 2: list ended by an illegal value
    v = '{3, 9, 2, 6};
    write_list(v);
    do_start(); wait_idle(200);
    e = '{3, 9};
    expect_pulses(e, "illegal-ended");

    // 3: full list of DEPTH entries, no terminator possible
    v.delete();
    for (int i = 0; i < DEPTH; i++) v.push_back(3 + (i * 7) % 5);
    write_list(v);
    do_start(); wait_idle(400);
    expect_pulses(v, "full-depth");

    // 4: empty list
    v = '{0};
    write_list(v);
    do_start(); wait_idle(50);
    e.delete();
    expect_pulses(e, "empty");
    check(!busy, "empty list leaves the stage idle");

    // 5: stop in mid-burst
    v = '{4, 4, 4, 4, 4, 4, 0};
    write_list(v);
    do_start();
    repeat (9) wait_ce();          // two pulses due at +4 and +8
    @(negedge clk iff ph == 0); stop = 1; wait_ce(); #0.1 stop = 0;
    wait_idle(100);
    repeat (20) wait_ce();
    check(pulses.size() == 2, $sformatf("stop: %0d pulses, expected 2", pulses.size()));
    check(!busy, "stop returns the stage to idle");

    // 6: list starts again from entry 0 after a stop
    do_start(); wait_idle(200);
    e = '{4, 4, 4, 4, 4, 4};
    expect_pulses(e, "restart after stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
