// trigger_emulator: FPGA design of an LHC-style trigger and fast-command
// emulator.
//
// The emulator produces the four LHC fast commands (LV1A trigger, BC0,
// Resynch, CalPulse) either as programmed bursts (a list of intervals per
// command) or, for LV1A, with truly random spacing measured from an
// avalanche-noise source, and sends them to front-end electronics as a T1
// serial stream, as a CLK+T1 combined clock, and as a TTC-like bi-phase mark
// stream for an optical transmitter.
//
// Data path:  host_interface -> pattern_generator (4 x interval RAM +
// burst_stage, masks, bunch disposition) -> t1_encoder (priority + serial
// T1) -> clk_t1_encoder and ttc_encoder. rng_interface measures random
// intervals for the LV1A stage; pot_spi_ctrl sets the noise source's two
// digital potentiometers.
//
// Clocking: one clock, clk = 160.32 MHz (from the board's PLL, outside this
// design). All fast-command logic runs at the 40.08 MHz bunch rate on the
// clock enable of clock_phase; the line encoders use all four 160.32 MHz
// slots of each 40.08 MHz period. Reset rst_n is asynchronous, active low,
// and must be released synchronously to clk.
//
// Ports not driven by logic here belong to parts outside the FPGA: the
// comparator input (rng_gate_in), the SPI lines of the potentiometers, the
// host bus and the serial outputs.
module trigger_emulator
  import te_pkg::*;
#(
  parameter int unsigned DEPTH = BURST_DEPTH,
  localparam int unsigned BXW  = $clog2(ORBIT_BX)
) (
  input  logic        clk,          // 160.32 MHz
  input  logic        rst_n,
  // host bus (see host_interface)
  input  logic        bus_wr,
  input  logic [15:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // true-random source
  input  logic        rng_gate_in,  // comparator (FPGA input gate) output, asynchronous
  output logic        pot_sclk,
  output logic        pot_mosi,
  output logic [1:0]  pot_cs_n,     // [0] bias potentiometer, [1] level potentiometer
  // fast-command outputs
  output logic        t1_out,       // serial T1, one bit per 40.08 MHz period
  output logic        clk40_out,    // 40.08 MHz clock, aligned with clk_t1_out
  output logic        clk_t1_out,   // CLK+T1 encoded
  output logic        ttc_out       // TTC-like bi-phase mark, to the optical transmitter
);
  logic [1:0]          phase;
  logic                ce40;

  logic                start, stop;
  emu_cfg_t            cfg;
  logic [31:0]         num_random;
  logic                ram_we;
  logic [1:0]          ram_sel;
  logic [$clog2(DEPTH)-1:0] ram_addr;
  logic [INTERVAL_W-1:0] ram_wdata, ram_rdata;
  logic                pot_wr_bias, pot_wr_level;
  logic [POT_W-1:0]    pot_bias, pot_level;
  logic                spi_busy;

  logic                rnd_valid, rnd_pop;
  logic [INTERVAL_W-1:0] rnd_value;
  logic [31:0]         rng_overruns, rng_short_edges;

  logic [NUM_CMDS-1:0] cmd_req, stage_busy, t1_sent, t1_dropped;
  logic                random_loading, gap_suppressed, filled, t1_busy;
  logic [BXW-1:0]      bx;

  clock_phase u_clk (
    .clk (clk), .rst_n (rst_n), .phase (phase), .ce40 (ce40)
  );

  host_interface #(.DEPTH(DEPTH), .IW(INTERVAL_W), .BXW(BXW)) u_host (
    .clk          (clk),
    .rst_n        (rst_n),
    .ce           (ce40),
    .bus_wr       (bus_wr),
    .bus_addr     (bus_addr),
    .bus_wdata    (bus_wdata),
    .bus_rdata    (bus_rdata),
    .start        (start),
    .stop         (stop),
    .cfg          (cfg),
    .num_random   (num_random),
    .ram_we       (ram_we),
    .ram_sel      (ram_sel),
    .ram_addr     (ram_addr),
    .ram_wdata    (ram_wdata),
    .ram_rdata    (ram_rdata),
    .pot_wr_bias  (pot_wr_bias),
    .pot_wr_level (pot_wr_level),
    .pot_bias     (pot_bias),
    .pot_level    (pot_level),
    .stage_busy   (stage_busy),
    .random_loading (random_loading),
    .spi_busy     (spi_busy),
    .rng_overruns (rng_overruns),
    .t1_dropped   (|t1_dropped),
    .gap_suppressed (gap_suppressed),
    .rng_short_edges (rng_short_edges),
    .bx           (bx)
  );

  pot_spi_ctrl #(.POT_W(POT_W)) u_pot (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_bias    (pot_wr_bias),
    .bias_code  (pot_bias),
    .wr_level   (pot_wr_level),
    .level_code (pot_level),
    .sclk       (pot_sclk),
    .mosi       (pot_mosi),
    .cs_n       (pot_cs_n),
    .busy       (spi_busy)
  );

  rng_interface #(.INTERVAL_W(INTERVAL_W), .MIN_INTERVAL(MIN_INTERVAL)) u_rng (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce40),
    .enable      (cfg.rng_enable),
    .gate_in     (rng_gate_in),
    .rnd_valid   (rnd_valid),
    .rnd_value   (rnd_value),
    .rnd_pop     (rnd_pop),
    .overruns    (rng_overruns),
    .short_edges (rng_short_edges)
  );

  pattern_generator #(.DEPTH(DEPTH)) u_pattern (
    .clk            (clk),
    .rst_n          (rst_n),
    .ce             (ce40),
    .start          (start),
    .stop           (stop),
    .cfg            (cfg),
    .num_random     (num_random),
    .ram_we         (ram_we),
    .ram_sel        (ram_sel),
    .ram_addr       (ram_addr),
    .ram_wdata      (ram_wdata),
    .ram_rdata      (ram_rdata),
    .rnd_valid      (rnd_valid),
    .rnd_value      (rnd_value),
    .rnd_pop        (rnd_pop),
    .cmd_req        (cmd_req),
    .stage_busy     (stage_busy),
    .random_loading (random_loading),
    .gap_suppressed (gap_suppressed),
    .bx             (bx),
    .filled         (filled)
  );

  t1_encoder u_t1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .ce      (ce40),
    .req     (cmd_req),
    .t1      (t1_out),
    .busy    (t1_busy),
    .sent    (t1_sent),
    .dropped (t1_dropped)
  );

  clk_t1_encoder u_clkt1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .phase      (phase),
    .t1         (t1_out),
    .clk40_out  (clk40_out),
    .clk_t1_out (clk_t1_out)
  );

  ttc_encoder u_ttc (
    .clk     (clk),
    .rst_n   (rst_n),
    .phase   (phase),
    .chan_a  (t1_out),
    .chan_b  (1'b1),          // channel B unused, held at '1'
    .ttc_out (ttc_out)
  );
endmodule
