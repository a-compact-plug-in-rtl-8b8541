// tb_host_interface: checks the register map. Configuration registers must
// read back what was written and drive their outputs; start and stop must
// reach the stages for exactly one 40.08 MHz enable, whenever in the period
// they were written; potentiometer writes must give one write strobe with
// the code; interval-RAM addresses must be decoded into stage and entry;
// status inputs and the event counters must read back.
`timescale 1ns/1ps
module tb_host_interface;
  import te_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic bus_wr = 0;
  logic [15:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic start, stop, ram_we, pot_wr_bias, pot_wr_level;
  emu_cfg_t cfg;
  logic [31:0] num_random;
  logic [1:0] ram_sel;
  logic [9:0] ram_addr;
  logic [31:0] ram_wdata;
  logic [31:0] ram_rdata = 0;
  // RAM model with a registered read: each entry reads as a tag of its address
  always @(posedge clk) ram_rdata <= 32'hA000_0000 | 32'({ram_sel, ram_addr});
  logic [7:0] pot_bias, pot_level;
  logic [3:0] stage_busy = 4'b1010;
  logic random_loading = 1, spi_busy = 0, t1_dropped = 0, gap_suppressed = 0;
  logic [31:0] rng_overruns = 32'd77, rng_short_edges = 32'd55;
  logic [11:0] bx = 12'd1234;

  host_interface dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .bus_wr(bus_wr), .bus_addr(bus_addr),
    .bus_wdata(bus_wdata), .bus_rdata(bus_rdata), .start(start), .stop(stop),
    .cfg(cfg), .num_random(num_random), .ram_we(ram_we), .ram_sel(ram_sel),
    .ram_addr(ram_addr), .ram_wdata(ram_wdata), .ram_rdata(ram_rdata), .pot_wr_bias(pot_wr_bias),
    .pot_wr_level(pot_wr_level), .pot_bias(pot_bias), .pot_level(pot_level),
    .stage_busy(stage_busy), .random_loading(random_loading), .spi_busy(spi_busy),
    .rng_overruns(rng_overruns), .t1_dropped(t1_dropped), .gap_suppressed(gap_suppressed),
    .rng_short_edges(rng_short_edges), .bx(bx));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count start/stop as seen by the stages (on ce) and pot strobes
  int n_start = 0, n_stop = 0, n_wb = 0, n_wl = 0;
  always @(posedge clk) begin
    if (ce && start) n_start++;
    if (ce && stop) n_stop++;
    if (pot_wr_bias) n_wb++;
    if (pot_wr_level) n_wl++;
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
    repeat (5) @(posedge clk); rst_n = 1;

    wr(16'(REG_CONFIG), 32'h1B5);
    rd(16'(REG_CONFIG), d);
    check(d == 32'h1B5, $sformatf("CONFIG reads %h", d));
    check(cfg.cmd_mask == 4'h5 && cfg.random_trigger && cfg.auto_bc0 && !cfg.disp_enable &&
          cfg.ion_mode && cfg.rng_enable, "CONFIG fields");
    wr(16'(REG_NUM_RANDOM), 32'd1000);
    rd(16'(REG_NUM_RANDOM), d);
    check(d == 1000 && num_random == 1000, "NUM_RANDOM");

    // start written in each of the four slots: always one ce with start
    for (int s = 0; s < 4; s++) begin
      int n_prev;
      n_prev = n_start;
      @(negedge clk iff ph == 2'(s));
      bus_wr = 1; bus_addr = 16'(REG_CONTROL); bus_wdata = 32'h1;
      @(negedge clk); bus_wr = 0;
      repeat (12) @(negedge clk);
      check(n_start == n_prev + 1, $sformatf("start written in slot %0d seen %0d times", s, n_start - n_prev));
    end
    wr(16'(REG_CONTROL), 32'h2);
    repeat (8) @(negedge clk);
    check(n_stop == 1, "stop seen once");

    wr(16'(REG_POT_BIAS), 32'hC3);
    wr(16'(REG_POT_LEVEL), 32'h5A);
    repeat (2) @(negedge clk);
    check(n_wb == 1 && n_wl == 1, "one strobe per potentiometer write");
    check(pot_bias == 8'hC3 && pot_level == 8'h5A, "potentiometer codes");
    rd(16'(REG_POT_BIAS), d); check(d == 32'hC3, "POT_BIAS reads back");

    // interval RAM write decode
    @(negedge clk); bus_wr = 1; bus_addr = 16'h8000 | (16'd2 << 12) | 16'd513; bus_wdata = 32'hCAFE0001;
    #0.1;
    check(ram_we && ram_sel == 2 && ram_addr == 513 && ram_wdata == 32'hCAFE0001, "RAM write decode");
    @(negedge clk); bus_wr = 0;
    #0.1 check(!ram_we, "RAM write enable only with bus_wr");
    @(negedge clk); bus_wr = 1; bus_addr = 16'(REG_CONFIG); bus_wdata = 32'h1B5;
    #0.1 check(!ram_we, "register write does not write the RAM");
    @(negedge clk); bus_wr = 0;

    rd(16'(REG_STATUS), d);
    check(d == 32'h2A, $sformatf("STATUS reads %h, expected 2a", d));
    rd(16'(REG_RNG_OVR), d);   check(d == 77, "RNG_OVR");
    rd(16'(REG_RNG_SHORT), d); check(d == 55, "RNG_SHORT");
    rd(16'(REG_BX), d);        check(d == 1234, "BX");

    // event counters count once per 40.08 MHz period
    @(negedge clk iff ph == 0); t1_dropped = 1; gap_suppressed = 1;
    repeat (12) @(negedge clk); t1_dropped = 0; gap_suppressed = 0;
    rd(16'(REG_T1_DROPS), d); check(d == 3, $sformatf("T1_DROPS %0d, expected 3", d));
    rd(16'(REG_GAP_SUPP), d); check(d == 3, $sformatf("GAP_SUPP %0d, expected 3", d));
    rd(16'h0100, d);          check(d == 0, "unused register reads 0");
    rd(16'h8000 | (16'd2 << 12) | 16'd77, d);
    check(d == (32'hA000_0000 | 32'({2'd2, 10'd77})), $sformatf("RAM read %h", d));
    rd(16'h8000 | (16'd0 << 12) | 16'd1023, d);
    check(d == (32'hA000_0000 | 32'({2'd0, 10'd1023})), $sformatf("RAM read %h", d));
    rd(16'(REG_BX), d);        check(d == 1234, "register read right after a RAM read");

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
