// tb_random_rate: random-trigger workload on the full emulator.
//
// The comparator input is driven with pulses whose spacing is exponentially
// distributed with a mean of 10 us (about 100 kHz, 401 bunch-clock
// periods), and the emulator is asked for a random burst of 1024 LV1A: it
// loads 1024 measured intervals into the LV1A list and plays them. The LV1A decoded
// from the T1 line must number 1024, keep at least 3 periods apart, and
// their spacing must look exponential with the source's mean: sample mean
// within 12 % of 401 periods, standard deviation close to the mean, and
// about e^-1 of the spacings above the mean.
`timescale 1ns/1ps
module tb_random_rate;
  import te_pkg::*;
  localparam int    N_TRIG  = 1024;
  localparam real   MEAN_NS = 10000.0;
  localparam real   PERIOD  = 1000.0 / 40.08;   // ns per bunch-clock period

  logic clk = 0, rst_n = 0;
  always #3.119 clk = ~clk;

  logic        bus_wr = 0;
  logic [15:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic        rng_gate_in = 0;
  logic        pot_sclk, pot_mosi;
  logic [1:0]  pot_cs_n;
  logic        t1_out, clk40_out, clk_t1_out, ttc_out;

  trigger_emulator dut (
    .clk(clk), .rst_n(rst_n), .bus_wr(bus_wr), .bus_addr(bus_addr), .bus_wdata(bus_wdata),
    .bus_rdata(bus_rdata), .rng_gate_in(rng_gate_in), .pot_sclk(pot_sclk), .pot_mosi(pot_mosi),
    .pot_cs_n(pot_cs_n), .t1_out(t1_out), .clk40_out(clk40_out), .clk_t1_out(clk_t1_out),
    .ttc_out(ttc_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] tph;
  int unsigned n40;
  always @(posedge clk)
    if (!rst_n) begin tph <= 0; n40 <= 0; end
    else begin tph <= tph + 1; if (tph == 3) n40 <= n40 + 1; end

  // T1 receiver: LV1A start cycles
  int unsigned lv1a[$];
  int rx_state = 0, n_other = 0;
  int unsigned rx_start;
  logic [1:0] rx_bits;
  always @(posedge clk) if (rst_n && tph == 3) begin
    case (rx_state)
      0: if (t1_out) begin rx_state = 1; rx_start = n40; end
      1: begin rx_bits[1] = t1_out; rx_state = 2; end
      default: begin
        rx_bits[0] = t1_out; rx_state = 0;
        if (rx_bits == 2'(CMD_LV1A)) lv1a.push_back(rx_start); else n_other++;
      end
    endcase
  end

  // exponential pulse source
  bit rng_on = 0;
  initial forever begin
    real u;
    wait (rng_on);
    u = ($urandom_range(1000000) + 1) / 1000001.0;
    #(-MEAN_NS * $ln(u));
    if (rng_on) begin rng_gate_in = 1; #12 rng_gate_in = 0; end
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a;
    @(negedge clk); d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wr(16'(REG_CONFIG), 32'h100);            // random source on
    rng_on = 1;
    #(5 * MEAN_NS);
    wr(16'(REG_NUM_RANDOM), N_TRIG);
    wr(16'(REG_CONFIG), 32'h110);            // LV1A from random intervals
    wr(16'(REG_CONTROL), 32'h1);
    begin
      int k;
      k = 0;
      repeat (20) @(posedge clk);
      rd(16'(REG_STATUS), d);
      while ((d[0] || d[5]) && k < 100000) begin
        repeat (4000) @(posedge clk); rd(16'(REG_STATUS), d); k++;
      end
    end
    repeat (100) @(posedge clk);
    rng_on = 0;
    check(lv1a.size() == N_TRIG, $sformatf("%0d LV1A decoded, expected %0d", lv1a.size(), N_TRIG));
    check(n_other == 0, "only LV1A sent");
    begin
      real sum, sum2, mean, sd, exp_mean;
      int above, min_gap, n, g;
      sum = 0; sum2 = 0; above = 0; min_gap = 1 << 30;
      n = lv1a.size() - 1;
      for (int i = 1; i <= n; i++) begin
        g = lv1a[i] - lv1a[i-1];
        sum += g; sum2 += real'(g) * g;
        if (g < min_gap) min_gap = g;
      end
      mean = sum / n;
      sd = $sqrt(sum2 / n - mean * mean);
      for (int i = 1; i <= n; i++) if (lv1a[i] - lv1a[i-1] > mean) above++;
      exp_mean = MEAN_NS / PERIOD;
      $display("LV1A spacing: mean %0.1f periods (source %0.1f), sd %0.1f, %0.3f above mean, min %0d",
               mean, exp_mean, sd, real'(above) / n, min_gap);
      check(min_gap >= 3, $sformatf("closest LV1A pair %0d periods", min_gap));
      check(mean > 0.88 * exp_mean && mean < 1.12 * exp_mean,
            $sformatf("mean spacing %0.1f, source %0.1f", mean, exp_mean));
      check(sd > 0.85 * mean && sd < 1.15 * mean, $sformatf("sd %0.1f vs mean %0.1f", sd, mean));
      check(real'(above) / n > 0.31 && real'(above) / n < 0.43,
            $sformatf("fraction above mean %0.3f, exponential gives 0.368", real'(above) / n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
