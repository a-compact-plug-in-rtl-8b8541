// tb_pattern_generator: checks the four command stages together.
//
// With 16-entry RAMs, the testbench loads an interval list per command,
// starts all stages at once and compares the cycle of every request with the
// running sums of the lists. Further cases: a masked command never appears;
// with the bunch disposition on, an LV1A that falls on an empty bunch slot
// (slots 72..79 follow the first train) is suppressed and reported; with
// automatic BC0, BC0 is requested exactly once per orbit, at slot 0; in
// random mode a start first loads the LV1A list from the intervals offered
// by the testbench and then starts all stages; a stop aborts the load; a
// count above DEPTH fills the whole list; RAM entries read back.
`timescale 1ns/1ps
module tb_pattern_generator;
  import te_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic start = 0, stop = 0;
  emu_cfg_t cfg = '0;
  logic [31:0] num_random = 0;
  logic ram_we = 0;
  logic [1:0] ram_sel = 0;
  logic [3:0] ram_addr = 0;
  logic [31:0] ram_wdata = 0, ram_rdata;
  logic rnd_valid = 0, rnd_pop;
  logic [31:0] rnd_value = 0;
  logic [3:0] cmd_req, stage_busy;
  logic random_loading, gap_suppressed, filled;
  logic [11:0] bx;

  pattern_generator #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .start(start), .stop(stop), .cfg(cfg),
    .num_random(num_random), .ram_we(ram_we), .ram_sel(ram_sel), .ram_addr(ram_addr),
    .ram_wdata(ram_wdata), .ram_rdata(ram_rdata), .rnd_valid(rnd_valid), .rnd_value(rnd_value), .rnd_pop(rnd_pop),
    .cmd_req(cmd_req), .stage_busy(stage_busy), .random_loading(random_loading),
    .gap_suppressed(gap_suppressed), .bx(bx), .filled(filled));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned n40 = 0, start_cycle;
  int unsigned req_cycle [4][$];
  int unsigned req_bx [4][$];
  int n_supp = 0;
  always @(posedge clk) if (ce) begin
    for (int k = 0; k < 4; k++) if (cmd_req[k]) begin
      req_cycle[k].push_back(n40); req_bx[k].push_back(bx);
    end
    if (gap_suppressed) n_supp++;
    n40 <= n40 + 1;
  end

  task automatic wait_ce(); @(posedge clk iff ce); endtask
  task automatic clear_log();
    for (int k = 0; k < 4; k++) begin req_cycle[k].delete(); req_bx[k].delete(); end
    n_supp = 0;
  endtask
  task automatic load(input int stage, input int unsigned v[$]);
    foreach (v[i]) begin
      @(negedge clk); ram_we = 1; ram_sel = 2'(stage); ram_addr = 4'(i); ram_wdata = v[i];
    end
    @(negedge clk); ram_we = 0;
  endtask
  task automatic do_start();
    @(negedge clk iff ph == 0); start = 1; start_cycle = n40;
    wait_ce(); #0.1 start = 0;
  endtask
  task automatic expect_times(input int k, input int unsigned iv[$], input string name);
    int unsigned t = start_cycle;
    check(req_cycle[k].size() == iv.size(),
          $sformatf("%s: %0d requests, expected %0d", name, req_cycle[k].size(), iv.size()));
    foreach (iv[i]) begin
      t += iv[i];
      if (i < req_cycle[k].size())
        check(req_cycle[k][i] == t, $sformatf("%s: request %0d at +%0d, expected +%0d",
                                             name, i, req_cycle[k][i] - start_cycle, t - start_cycle));
    end
  endtask

  initial begin
    int unsigned e[$];
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (4) wait_ce();

    // 1: four programmed lists
    load(CMD_LV1A,     '{10, 5, 0});
    load(CMD_BC0,      '{7, 0});
    load(CMD_RESYNCH,  '{12, 0});
    load(CMD_CALPULSE, '{4, 4, 3, 0});
    clear_log(); do_start(); repeat (40) wait_ce();
    expect_times(CMD_LV1A,     '{10, 5},     "LV1A");
    expect_times(CMD_BC0,      '{7},         "BC0");
    expect_times(CMD_RESYNCH,  '{12},        "Resynch");
    expect_times(CMD_CALPULSE, '{4, 4, 3},   "CalPulse");
    check(stage_busy == 0, "all stages idle after their bursts");

    // 2: CalPulse masked
    cfg.cmd_mask = 4'b1000;
    clear_log(); do_start(); repeat (40) wait_ce();
    check(req_cycle[CMD_CALPULSE].size() == 0, "masked CalPulse never requested");
    expect_times(CMD_LV1A, '{10, 5}, "LV1A beside a mask");
    cfg.cmd_mask = 4'b0000;

    // 3: gap suppression: pulses at bx 65, 70, 75, 80; 75 is in the first gap
    load(CMD_LV1A, '{5, 5, 5, 5, 0});
    cfg.disp_enable = 1;
    clear_log();
    @(negedge clk iff (ph == 0 && bx == 60)); start = 1; start_cycle = n40;
    wait_ce(); #0.1 start = 0;
    repeat (40) wait_ce();
    e = '{65, 70, 80};
    check(req_bx[CMD_LV1A].size() == 3, $sformatf("gap: %0d LV1A, expected 3", req_bx[CMD_LV1A].size()));
    foreach (e[i]) if (i < req_bx[CMD_LV1A].size())
      check(req_bx[CMD_LV1A][i] == e[i], $sformatf("gap: LV1A at bx %0d, expected %0d", req_bx[CMD_LV1A][i], e[i]));
    check(n_supp == 1, $sformatf("gap: %0d suppressed, expected 1", n_supp));
    cfg.disp_enable = 0;

    // 4: automatic BC0 over two orbits
    cfg.auto_bc0 = 1;
    @(posedge clk iff (ce && bx == 100));
    #0.1 clear_log();
    repeat (2 * 3564) wait_ce();
    check(req_bx[CMD_BC0].size() == 2, $sformatf("auto BC0: %0d in two orbits", req_bx[CMD_BC0].size()));
    foreach (req_bx[CMD_BC0][i]) check(req_bx[CMD_BC0][i] == 0, "auto BC0 at bunch slot 0");
    if (req_cycle[CMD_BC0].size() == 2)
      check(req_cycle[CMD_BC0][1] - req_cycle[CMD_BC0][0] == 3564, "auto BC0 once per orbit");
    cfg.auto_bc0 = 0;

    // 5: random mode: a start loads four offered intervals into the LV1A RAM,
    // then all stages start together (BC0, list {7}, marks the start)
    cfg.random_trigger = 1; num_random = 4;
    clear_log();
    fork
      begin
        int unsigned r[4] = '{6, 3, 9, 4};
        repeat (3) wait_ce();
        foreach (r[i]) begin
          repeat (5) wait_ce();
          @(negedge clk); rnd_valid = 1; rnd_value = r[i];
          @(posedge clk iff (ce && rnd_pop)); #0.1 rnd_valid = 0;
        end
        @(negedge clk); rnd_valid = 1; rnd_value = 11;   // one too many
      end
      begin
        do_start();
        wait_ce(); #0.1;
        check(random_loading && stage_busy == 0, "random: stages wait while the list loads");
        repeat (80) wait_ce();
      end
    join
    check(rnd_valid, "random: no interval taken beyond num_random");
    @(negedge clk) rnd_valid = 0;
    check(!random_loading, "random: load finished");
    check(req_cycle[CMD_BC0].size() == 1, "random: BC0 once");
    if (req_cycle[CMD_BC0].size() == 1) begin
      start_cycle = req_cycle[CMD_BC0][0] - 7;
      check(req_cycle[CMD_BC0][0] > n40 - 60, "random: stages start after the load");
      expect_times(CMD_LV1A, '{6, 3, 9, 4}, "random LV1A");
    end
    cfg.random_trigger = 0;
    // the loaded list reads back, with its end mark, and BC0's list beside it
    e = '{6, 3, 9, 4, 0};
    foreach (e[i]) begin
      @(negedge clk); ram_sel = 2'(CMD_LV1A); ram_addr = 4'(i);
      @(negedge clk);
      check(ram_rdata == e[i], $sformatf("read back entry %0d: %0d, expected %0d", i, ram_rdata, e[i]));
    end
    @(negedge clk); ram_sel = 2'(CMD_BC0); ram_addr = 0;
    @(negedge clk);
    check(ram_rdata == 7, $sformatf("read back BC0 entry 0: %0d", ram_rdata));

    // 6: a stop during the load aborts it, and no stage starts
    cfg.random_trigger = 1; num_random = 4;
    clear_log();
    do_start();
    @(negedge clk); rnd_valid = 1; rnd_value = 5;
    @(posedge clk iff (ce && rnd_pop)); #0.1 rnd_valid = 0;
    @(negedge clk iff ph == 0); stop = 1; wait_ce(); #0.1 stop = 0;
    wait_ce(); #0.1;
    check(!random_loading, "random: stop ends the load");
    repeat (40) wait_ce();
    check(req_cycle[CMD_BC0].size() == 0 && req_cycle[CMD_LV1A].size() == 0,
          "random: no stage starts after an aborted load");

    // 7: num_random above DEPTH fills all entries; a new value every period
    num_random = 100;
    clear_log();
    fork
      begin
        @(negedge clk); rnd_valid = 1; rnd_value = 3;
        for (int i = 0; i < DEPTH; i++) begin
          @(posedge clk iff (ce && rnd_pop)); #0.1 rnd_value = 3 + (i + 1) % 4;
        end
        @(negedge clk); rnd_valid = 0;
      end
      begin do_start(); repeat (120) wait_ce(); end
    join
    e = {};
    for (int i = 0; i < DEPTH; i++) e.push_back(3 + i % 4);
    check(req_cycle[CMD_BC0].size() == 1, "random: full load starts the stages");
    if (req_cycle[CMD_BC0].size() == 1) begin
      start_cycle = req_cycle[CMD_BC0][0] - 7;
      expect_times(CMD_LV1A, e, "random LV1A, full list");
    end
    cfg.random_trigger = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
