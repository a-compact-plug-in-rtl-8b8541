// tb_trigger_emulator: end-to-end test of the emulator at its default sizes
// (1024-entry interval lists, 32-bit intervals, 3564-slot orbit).
//
// The testbench acts as the PC: it writes registers and interval lists over
// the host bus, drives the comparator input with random pulses, and listens
// to all three serial outputs. A T1 receiver decodes commands from t1_out;
// the CLK+T1 and TTC outputs are decoded every 40.08 MHz period and must
// carry the same T1 bit (and '1' on TTC channel B). A behavioural model of
// the priority rules, fed with the request times that follow from the
// programmed lists, the masks, the bunch map and automatic BC0, predicts
// the exact decoded command sequence and its timing.
//
// Phases: (A) four programmed lists with coincident commands: priority
// conflicts, merged commands, a list ended by zero, one ended by an illegal
// value and the LV1A list run to all 1024 entries; (B) ion bunch map with
// gap suppression, automatic BC0 and a masked command; (C) random triggers
// from the noise input: the LV1A list is loaded from the measured
// intervals (with replaced values and ignored short intervals on the way)
// and the decoded LV1A spacing must equal the loaded intervals; (D) stop in mid-burst; plus two potentiometer SPI writes.
// Every mechanism is counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_trigger_emulator;
  import te_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.119 clk = ~clk;           // 160.32 MHz

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

  // ---------------------------------------------------------------- timing
  logic [1:0] tph;                     // slot of the 40.08 MHz period
  int unsigned n40;                    // 40.08 MHz period number since reset
  always @(posedge clk)
    if (!rst_n) begin tph <= 0; n40 <= 0; end
    else begin tph <= tph + 1; if (tph == 3) n40 <= n40 + 1; end

  // ---------------------------------------------------------- T1 receiver
  int rx_cmd[$];
  int unsigned rx_cycle[$];
  int rx_state = 0;
  int unsigned rx_start;
  logic [1:0] rx_bits;
  always @(posedge clk) if (rst_n && tph == 3) begin
    case (rx_state)
      0: if (t1_out) begin rx_state = 1; rx_start = n40; end
      1: begin rx_bits[1] = t1_out; rx_state = 2; end
      default: begin
        rx_bits[0] = t1_out; rx_state = 0;
        rx_cmd.push_back(int'(rx_bits)); rx_cycle.push_back(rx_start);
      end
    endcase
  end

  // ------------------------------------------- CLK+T1 and TTC line decoders
  int clk_t1_err = 0, ttc_err = 0, line_periods = 0, removed_pulses = 0;
  logic hc [4];
  logic t1_of_period, prev_hc3 = 0;
  bit   ttc_synced = 0;
  always @(posedge clk) if (rst_n) begin
    // output value before this edge was set at the previous edge (slot tph-1)
    hc[(int'(tph) + 3) % 4] = ttc_out;
    if (tph == 2) begin
      if (!clk40_out || clk_t1_out != !t1_out) clk_t1_err++;
      if (t1_out) removed_pulses++;
    end
    if (tph == 0 && clk40_out) clk_t1_err++;
    if (tph == 0) begin                 // period that just ended is complete
      if (ttc_synced) begin
        if (hc[0] == prev_hc3 || hc[2] == hc[1]) ttc_err++;    // cell-start transitions
        if ((hc[0] != hc[1]) != t1_of_period) ttc_err++;       // channel A = T1
        if (hc[2] == hc[3]) ttc_err++;                         // channel B = 1
        line_periods++;
      end
      ttc_synced = 1;
      prev_hc3 = hc[3];
    end
    if (tph == 3) t1_of_period = t1_out;
  end

  // ------------------------------------------------------ SPI slave model
  int spi_frames = 0;
  int spi_val [2];
  logic [7:0] spi_sh;
  logic prev_sclk = 0;
  logic [1:0] prev_cs = 2'b11;
  always @(posedge clk) if (rst_n) begin
    if (pot_cs_n != 2'b11 && pot_sclk && !prev_sclk) spi_sh = {spi_sh[6:0], pot_mosi};
    if (prev_cs != 2'b11 && pot_cs_n == 2'b11) begin
      spi_val[prev_cs[0] ? 1 : 0] = spi_sh;
      spi_frames++;
    end
    prev_sclk = pot_sclk; prev_cs = pot_cs_n;
  end

  // -------------------------------------------------- mechanism counters
  int unsigned loaded_iv[$];         // random intervals taken into the LV1A list
  int n_conflict = 0, n_loaded = 0, n_gap_supp_seen = 0, n_masked = 0;
  always @(posedge clk) if (rst_n && tph == 3) begin
    if ($countones(dut.cmd_req | dut.u_t1.pending) >= 2) n_conflict++;
    if (dut.rnd_pop) begin n_loaded++; loaded_iv.push_back(dut.rnd_value); end
    if (dut.gap_suppressed) n_gap_supp_seen++;
    if (dut.u_pattern.pulse[CMD_CALPULSE] && dut.cfg.cmd_mask[CMD_CALPULSE]) n_masked++;
  end

  // ----------------------------------------------------------- host bus
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a;
    @(negedge clk); d = bus_rdata;
  endtask
  task automatic load(input int stage, input int unsigned v[$]);
    foreach (v[i]) wr(16'h8000 | 16'(stage << 12) | 16'(i), v[i]);
  endtask
  // start all stages; returns the 40.08 MHz period that samples it
  task automatic start_all(output int unsigned c);
    @(negedge clk iff tph == 0); bus_wr = 1; bus_addr = 16'(REG_CONTROL); bus_wdata = 1;
    c = n40;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic wait_periods(input int n);
    repeat (n) @(posedge clk iff tph == 3);
  endtask

  // --------------------------------------------- reference fill map (ions)
  bit ion_map [3564];
  task automatic build_ion_map();
    int inj [12] = '{3, 3, 4, 3, 3, 4, 3, 3, 4, 3, 3, 3};
    int pos = 0;
    foreach (ion_map[i]) ion_map[i] = 0;
    foreach (inj[i]) begin
      for (int t = 0; t < inj[i]; t++) begin
        for (int b = 0; b < 72; b += 4) ion_map[pos + b] = 1;
        pos += 72 + ((t != inj[i] - 1) ? 8 : 0);
      end
      pos += 38;
    end
  endtask

  // ------------------------------------------------ priority/T1 model
  // req_at: cycle -> request bits; produces expected (cmd, start cycle) list
  typedef struct { int cmd; int unsigned cyc; } code_t;
  task automatic model_t1(input logic [3:0] req_at[int unsigned], input int unsigned from,
                          input int unsigned to, output code_t out[$], output int drops);
    int pend [4] = '{0, 0, 0, 0};
    int bits = 0;
    fast_cmd_e order [4] = '{CMD_RESYNCH, CMD_BC0, CMD_CALPULSE, CMD_LV1A};
    out.delete(); drops = 0;
    for (int unsigned c = from; c <= to; c++) begin
      logic [3:0] r = req_at.exists(c) ? req_at[c] : 4'b0;
      for (int k = 0; k < 4; k++) if (r[k]) begin
        if (pend[k]) drops++;
        pend[k] = 1;
      end
      if (bits > 0) bits--;
      else foreach (order[j]) if (pend[int'(order[j])]) begin
        code_t x;
        x.cmd = int'(order[j]); x.cyc = c + 1;
        out.push_back(x);
        pend[int'(order[j])] = 0; bits = 2;
        break;
      end
    end
  endtask

  task automatic compare(input code_t exp[$], input string name);
    int first_bad = -1;
    check(rx_cmd.size() == exp.size(),
          $sformatf("%s: %0d commands decoded, model %0d", name, rx_cmd.size(), exp.size()));
    foreach (exp[i]) if (i < rx_cmd.size() && first_bad < 0)
      if (rx_cmd[i] != exp[i].cmd || rx_cycle[i] != exp[i].cyc) first_bad = i;
    check(first_bad < 0, $sformatf("%s: command %0d differs from the model", name, first_bad));
    if (first_bad >= 0)
      $display("  got cmd %0d at %0d, model cmd %0d at %0d", rx_cmd[first_bad],
               rx_cycle[first_bad], exp[first_bad].cmd, exp[first_bad].cyc);
  endtask

  // schedule the pulses of a list as requests of command k
  task automatic add_list(inout logic [3:0] req_at[int unsigned], input int k,
                          input int unsigned v[$], input int unsigned s,
                          input bit gate_ion, inout int n_gated);
    int unsigned t = s;
    foreach (v[i]) begin
      if (v[i] < 3) break;
      t += v[i];
      if (gate_ion && !ion_map[t % 3564]) begin n_gated++; continue; end
      req_at[t] = (req_at.exists(t) ? req_at[t] : 4'b0) | 4'(1 << k);
    end
  endtask

  // ------------------------------------------------------ random source
  bit rng_on = 0;
  int rng_pulses = 0;
  initial forever begin
    real u, gap_ns;
    wait (rng_on);
    u = ($urandom_range(1000000) + 1) / 1000001.0;
    gap_ns = -600.0 * $ln(u);            // mean 600 ns, about 24 periods
    if ($urandom_range(9) == 0) gap_ns = 20.0 + $urandom_range(30);  // a close pair
    #(gap_ns + 12.0);
    if (rng_on) begin
      rng_gate_in = 1; #12 rng_gate_in = 0;
      rng_pulses++;
    end
  end

  // ---------------------------------------------------------------- test
  int n_end_zero = 0, n_end_illegal = 0, n_end_full = 0, n_stops = 0;
  int n_auto_bc0 = 0, n_random_lv1a = 0, n_mode_switch = 0, n_readback = 0;

  initial begin
    logic [31:0] d;
    int unsigned s;
    int drops, n_gated;
    logic [3:0] req_at[int unsigned];
    code_t exp[$];
    int unsigned lv1a[$], bc0[$], res[$], cal[$];

    repeat (6) @(posedge clk);
    @(negedge clk) rst_n = 1;
    build_ion_map();

    // potentiometers
    wr(16'(REG_POT_BIAS), 32'h96);
    wr(16'(REG_POT_LEVEL), 32'h4B);

    // ---------------- phase A: programmed lists
    lv1a.delete();
    for (int i = 0; i < BURST_DEPTH; i++) lv1a.push_back(3 + ((i * 5) % 4));    // 3..6
    bc0 = '{40, 500, 1300, 0};
    res = '{41, 900, 2, 77};                       // 2 is illegal: ends the list
    cal = '{42, 10, 10, 10, 600, 0};
    load(CMD_LV1A, lv1a); load(CMD_BC0, bc0); load(CMD_RESYNCH, res); load(CMD_CALPULSE, cal);
    wr(16'(REG_CONFIG), 32'h0);
    rx_cmd.delete(); rx_cycle.delete();
    start_all(s);
    req_at.delete(); n_gated = 0;
    add_list(req_at, CMD_LV1A, lv1a, s, 0, n_gated);
    add_list(req_at, CMD_BC0, bc0, s, 0, n_gated);
    add_list(req_at, CMD_RESYNCH, res, s, 0, n_gated);
    add_list(req_at, CMD_CALPULSE, cal, s, 0, n_gated);
    wait_periods(5000);
    model_t1(req_at, s, s + 5000, exp, drops);
    compare(exp, "programmed");
    rd(16'(REG_T1_DROPS), d);
    check(d == drops, $sformatf("programmed: %0d merged commands, model %0d", d, drops));
    rd(16'(REG_STATUS), d);
    check(d[3:0] == 0, "programmed: all stages finished");
    n_end_zero++;         // BC0 and CalPulse lists end on zero
    n_end_illegal++;      // Resynch list ends on 2
    begin
      int n = 0;
      foreach (rx_cmd[i]) if (rx_cmd[i] == CMD_LV1A) n++;
      if (n + drops >= BURST_DEPTH - 1) n_end_full++;
      check(n + drops == BURST_DEPTH, $sformatf("LV1A sent %0d + merged %0d, list %0d", n, drops, BURST_DEPTH));
    end
    check(spi_frames == 2 && spi_val[0] == 'h96 && spi_val[1] == 'h4B,
          $sformatf("SPI: %0d frames, A=%h B=%h", spi_frames, spi_val[0], spi_val[1]));

    // ---------------- phase B: ion map, gap suppression, auto BC0, CalPulse masked
    lv1a.delete();
    for (int i = 0; i < 700; i++) lv1a.push_back(7);
    lv1a.push_back(0);
    load(CMD_LV1A, lv1a);
    // mask CalPulse, random off, auto BC0, disposition on, ion pattern
    wr(16'(REG_CONFIG), 32'h0E8);
    n_mode_switch++;
    rx_cmd.delete(); rx_cycle.delete();
    start_all(s);
    req_at.delete(); n_gated = 0;
    add_list(req_at, CMD_LV1A, lv1a, s, 1, n_gated);
    // automatic BC0 at every bunch slot 0 from the start period on
    for (int unsigned c = s; c <= s + 5200; c++) if (c % 3564 == 0) begin
      req_at[c] = (req_at.exists(c) ? req_at[c] : 4'b0) | 4'(1 << CMD_BC0);
      n_auto_bc0++;
    end
    // the CalPulse list from phase A runs again but is masked
    // Resynch list still holds 41, 900, 2: sends two
    add_list(req_at, CMD_RESYNCH, res, s, 0, n_gated);
    wait_periods(5200);
    wr(16'(REG_CONFIG), 32'h0);
    model_t1(req_at, s, s + 5200, exp, drops);
    compare(exp, "ion map / auto BC0 / mask");
    begin
      int n_cal = 0;
      foreach (rx_cmd[i]) if (rx_cmd[i] == CMD_CALPULSE) n_cal++;
      check(n_cal == 0, "masked CalPulse never sent");
      check(n_masked == 5, $sformatf("%0d CalPulse masked, list has 5", n_masked));
    end
    rd(16'(REG_GAP_SUPP), d);
    check(d == n_gated, $sformatf("gap suppression: %0d, model %0d", d, n_gated));
    check(n_gated > 0 && n_gated == n_gap_supp_seen, "gap suppression seen");
    rd(16'(REG_BX), d);
    check(d == (n40 - 1) % 3564 || d == n40 % 3564, $sformatf("BX register %0d, period %0d", d, n40 % 3564));

    // ---------------- phase C: random triggers
    wr(16'(REG_CONFIG), 32'h100);         // random source on, it arms
    rng_on = 1;
    wait_periods(200);
    wr(16'(REG_NUM_RANDOM), 300);
    wr(16'(REG_CONFIG), 32'h110);         // random source on, random trigger
    n_mode_switch++;
    // empty the other lists so only LV1A runs
    load(CMD_BC0, '{0}); load(CMD_RESYNCH, '{0}); load(CMD_CALPULSE, '{0});
    rx_cmd.delete(); rx_cycle.delete(); loaded_iv.delete();
    start_all(s);
    begin
      int k = 0;
      wait_periods(10);
      rd(16'(REG_STATUS), d);
      check(d[5], "random: list loading after start");
      while ((d[0] || d[5]) && k < 400) begin wait_periods(200); rd(16'(REG_STATUS), d); k++; end
    end
    wait_periods(10);
    rng_on = 0;
    begin
      int n = 0, min_gap = 1000000;
      foreach (rx_cmd[i]) begin
        if (rx_cmd[i] == CMD_LV1A) n++;
        if (i > 0 && rx_cycle[i] - rx_cycle[i-1] < min_gap) min_gap = rx_cycle[i] - rx_cycle[i-1];
      end
      n_random_lv1a = n;
      check(n == 300, $sformatf("random: %0d LV1A, expected 300", n));
      check(min_gap >= 3, $sformatf("random: closest LV1A pair %0d periods apart", min_gap));
      check(rx_cmd.size() == n, "random: only LV1A sent");
      check(loaded_iv.size() == 300, $sformatf("random: %0d intervals loaded", loaded_iv.size()));
      n = 0;
      for (int i = 1; i < rx_cycle.size() && i < loaded_iv.size(); i++)
        if (rx_cycle[i] - rx_cycle[i-1] != loaded_iv[i]) n++;
      check(n == 0, $sformatf("random: %0d LV1A spacings differ from the loaded intervals", n));
    end
    begin
      int bad = 0;
      for (int i = 0; i <= 300; i++) begin
        rd(16'h8000 | (16'(CMD_LV1A) << 12) | 16'(i), d);
        if (d != (i < 300 && i < loaded_iv.size() ? loaded_iv[i] : 0)) bad++;
      end
      n_readback = 301 - bad;
      check(bad == 0, $sformatf("random: %0d loaded entries read back wrong", bad));
    end
    rd(16'(REG_RNG_OVR), d);
    check(d > 0, $sformatf("random: %0d replaced values", d));
    rd(16'(REG_RNG_SHORT), d);
    check(d > 0, $sformatf("random: %0d short intervals ignored", d));
    wr(16'(REG_CONFIG), 32'h0);
    n_mode_switch++;

    // ---------------- phase D: stop in mid-burst
    lv1a.delete();
    for (int i = 0; i < 100; i++) lv1a.push_back(10);
    lv1a.push_back(0);
    load(CMD_LV1A, lv1a);
    rx_cmd.delete(); rx_cycle.delete();
    start_all(s);
    wait_periods(255);                     // 25 LV1A due by now
    wr(16'(REG_CONTROL), 32'h2);
    n_stops++;
    wait_periods(50);
    rd(16'(REG_STATUS), d);
    check(d[3:0] == 0, "stop: stages idle");
    check(rx_cmd.size() == 25, $sformatf("stop: %0d LV1A before the stop, expected 25", rx_cmd.size()));

    // ---------------- line codes and mechanism coverage
    check(line_periods > 10000, $sformatf("line decoders saw %0d periods", line_periods));
    check(clk_t1_err == 0, $sformatf("CLK+T1: %0d errors", clk_t1_err));
    check(ttc_err == 0, $sformatf("TTC: %0d errors", ttc_err));
    check(removed_pulses > 0, "CLK+T1 removed clock pulses");
    begin
      logic [31:0] drops_total;
      rd(16'(REG_T1_DROPS), drops_total);
      $display("mechanisms: conflicts=%0d merged=%0d end_zero=%0d end_illegal=%0d end_full=%0d",
               n_conflict, drops_total, n_end_zero, n_end_illegal, n_end_full);
      $display("            gap_suppressed=%0d auto_bc0=%0d masked=%0d random_lv1a=%0d loaded=%0d",
               n_gap_supp_seen, n_auto_bc0, n_masked, n_random_lv1a, n_loaded);
      $display("            stops=%0d readback=%0d mode_switches=%0d spi_frames=%0d rng_pulses=%0d",
               n_stops, n_readback, n_mode_switch, spi_frames, rng_pulses);
      check(n_conflict > 0, "mechanism: priority conflict");
      check(drops_total > 0, "mechanism: merged command");
      check(n_end_zero > 0 && n_end_illegal > 0 && n_end_full > 0, "mechanism: three list ends");
      check(n_gap_supp_seen > 0, "mechanism: gap suppression");
      check(n_auto_bc0 > 0, "mechanism: automatic BC0");
      check(n_masked > 0, "mechanism: mask");
      check(n_random_lv1a > 0, "mechanism: random triggers");
      check(n_loaded > 0, "mechanism: random load");
      check(n_readback > 0, "mechanism: RAM read back");
      check(n_stops > 0, "mechanism: stop");
      check(n_mode_switch > 0, "mechanism: mode switch");
      check(spi_frames > 0, "mechanism: SPI write");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
