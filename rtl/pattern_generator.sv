// pattern_generator: produces the four fast-command patterns.
//
// Four identical stages, one per fast command (LV1A, BC0, Resynch,
// CalPulse, indexed by te_pkg::fast_cmd_e), each an interval RAM plus a
// burst_stage. A start (or stop) from the host acts on all four at once.
// Only the LV1A (trigger) stage may be loaded from the true-random source
// instead of by the host (cfg.random_trigger): then a start first fills the
// LV1A interval RAM with min(num_random, DEPTH) intervals measured by the
// random source, one per measurement, ends the list with a zero if it is
// shorter than DEPTH, and only then starts all four stages together
// (random_loading is high meanwhile). The burst that follows therefore has
// exactly the measured, exponentially distributed spacings. A stop aborts
// the load. A start is not taken for loading while the LV1A stage still
// runs. On the way out:
//  * any command can be masked (cfg.cmd_mask bit = 1 suppresses it),
//  * with cfg.disp_enable, an LV1A falling on an empty bunch slot of the
//    emulated LHC bunch disposition is suppressed (and reported on
//    gap_suppressed),
//  * with cfg.auto_bc0, BC0 comes once per orbit, at bunch slot 0, from the
//    bunch disposition machine instead of from the BC0 stage.
// The document gives the four stages, the loading of the trigger stage from
// the random source, the masks and the gap suppression; automatic BC0 follows the
// "Automatic BC0 / Programmable BC0" choice of the control panel. Which
// commands the gap suppression acts on (LV1A only) and the load-then-start
// sequence are this design's choices.
//
// Timing: cmd_req is combinational from registers that change on ce, so it
// is valid for one whole 40.08 MHz period, aligned with bx and filled.
// The host writes interval RAMs through ram_we/ram_sel/ram_addr/ram_wdata
// (one word per clock) and reads them back on ram_rdata one clock after
// presenting ram_sel/ram_addr. During a random load the loader owns the
// LV1A RAM's host port: host writes to that RAM are ignored, and a read of
// it returns the entry being filled.
module pattern_generator
  import te_pkg::*;
#(
  parameter int unsigned DEPTH        = BURST_DEPTH,
  parameter int unsigned IW           = INTERVAL_W,
  parameter int unsigned MIN_SPACING  = MIN_INTERVAL,
  parameter int unsigned ORBIT        = ORBIT_BX,
  localparam int unsigned AW          = $clog2(DEPTH),
  localparam int unsigned BXW         = $clog2(ORBIT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic                start,
  input  logic                stop,
  input  emu_cfg_t            cfg,
  input  logic [31:0]         num_random,
  // interval RAM write port
  input  logic                ram_we,
  input  logic [1:0]          ram_sel,
  input  logic [AW-1:0]       ram_addr,
  input  logic [IW-1:0]       ram_wdata,
  output logic [IW-1:0]       ram_rdata,     // entry ram_sel/ram_addr of the clock before
  // random intervals
  input  logic                rnd_valid,
  input  logic [IW-1:0]       rnd_value,
  output logic                rnd_pop,
  // fast command requests to the T1 encoder
  output logic [NUM_CMDS-1:0] cmd_req,
  // status
  output logic [NUM_CMDS-1:0] stage_busy,
  output logic                random_loading, // LV1A list being loaded from the random source
  output logic                gap_suppressed,
  output logic [BXW-1:0]      bx,
  output logic                filled
);
  logic [NUM_CMDS-1:0] pulse;
  logic                orbit_start;

  // random load of the LV1A RAM
  logic                loading;
  logic                load_done;    // list complete: start all stages on the next ce
  logic [AW:0]         fill_addr;
  logic [AW:0]         fill_n;
  logic                fill_end;     // all requested intervals written
  logic                load_we;
  logic [IW-1:0]       load_wdata;
  logic                stage_start;
  logic [1:0]          rd_sel;       // ram_sel of the read now on the RAM outputs
  logic [IW-1:0]       host_rdata [NUM_CMDS];

  always_comb begin
    fill_end    = (fill_addr == fill_n);
    rnd_pop     = ce && loading && !stop && !fill_end && rnd_valid;
    load_we     = ce && loading && !stop && (fill_end ? (fill_n != (AW+1)'(DEPTH)) : rnd_valid);
    load_wdata  = fill_end ? '0 : rnd_value;
    stage_start = load_done || (start && !cfg.random_trigger);
    random_loading = loading;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sel <= '0;
    end else begin
      rd_sel <= ram_sel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading   <= 1'b0;
      load_done <= 1'b0;
      fill_addr <= '0;
      fill_n    <= '0;
    end else if (ce) begin
      load_done <= 1'b0;
      if (stop) begin
        loading <= 1'b0;
      end else if (loading) begin
        if (fill_end) begin
          loading   <= 1'b0;
          load_done <= 1'b1;
        end else if (rnd_valid) begin
          fill_addr <= fill_addr + 1'b1;
        end
      end else if (start && cfg.random_trigger && !stage_busy[CMD_LV1A]) begin
        loading   <= 1'b1;
        fill_addr <= '0;
        fill_n    <= (num_random >= 32'(DEPTH)) ? (AW+1)'(DEPTH) : (AW+1)'(num_random);
      end
    end
  end

  for (genvar s = 0; s < NUM_CMDS; s++) begin : g_stage
    logic [AW-1:0] raddr;
    logic [IW-1:0] rdata;

    logic          we;
    logic [AW-1:0] addr_a;
    logic [IW-1:0] wdata;

    if (s == int'(CMD_LV1A)) begin : g_load
      always_comb begin
        we    = loading ? load_we : (ram_we && ram_sel == 2'(s));
        addr_a = loading ? fill_addr[AW-1:0] : ram_addr;
        wdata = loading ? load_wdata : ram_wdata;
      end
    end else begin : g_host
      always_comb begin
        we    = ram_we && ram_sel == 2'(s);
        addr_a = ram_addr;
        wdata = ram_wdata;
      end
    end

    interval_ram #(.DEPTH(DEPTH), .WIDTH(IW)) u_ram (
      .clk   (clk),
      .we      (we),
      .addr_a  (addr_a),
      .wdata   (wdata),
      .rdata_a (host_rdata[s]),
      .raddr (raddr),
      .rdata (rdata)
    );

    burst_stage #(.DEPTH(DEPTH), .INTERVAL_W(IW), .MIN_INTERVAL(MIN_SPACING)) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .ce          (ce),
      .start       (stage_start),
      .stop        (stop),
      .ram_raddr   (raddr),
      .ram_rdata   (rdata),
      .pulse       (pulse[s]),
      .busy        (stage_busy[s])
    );
  end

  bunch_disposition #(.ORBIT_BX(ORBIT)) u_disp (
    .clk         (clk),
    .rst_n       (rst_n),
    .ce          (ce),
    .ion_mode    (cfg.ion_mode),
    .bx          (bx),
    .filled      (filled),
    .orbit_start (orbit_start)
  );

  always_comb begin
    ram_rdata      = host_rdata[rd_sel];
    gap_suppressed = pulse[CMD_LV1A] && !cfg.cmd_mask[CMD_LV1A] && cfg.disp_enable && !filled;

    cmd_req[CMD_LV1A]     = pulse[CMD_LV1A] && (!cfg.disp_enable || filled);
    cmd_req[CMD_BC0]      = cfg.auto_bc0 ? orbit_start : pulse[CMD_BC0];
    cmd_req[CMD_RESYNCH]  = pulse[CMD_RESYNCH];
    cmd_req[CMD_CALPULSE] = pulse[CMD_CALPULSE];
    cmd_req &= ~cfg.cmd_mask;
  end
endmodule
