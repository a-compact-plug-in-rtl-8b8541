// host_interface: register file through which the PC sets the emulator up.
//
// The board reaches the FPGA from a PC over USB (through a USB interface
// chip) or from a VME carrier; the document names that link but not its
// bus. This block is the FPGA side as a plain synchronous word bus:
//   bus_wr with bus_addr/bus_wdata writes one word per clock;
//   bus_rdata returns the register or RAM entry at bus_addr one clock later.
// Address map (word addresses):
//   bus_addr[15] = 0 : registers, numbers in te_pkg (REG_*)
//     CONTROL    W  bit0 start all stages, bit1 stop all stages
//     CONFIG     RW emu_cfg_t: [3:0] command mask, [4] random trigger,
//                   [5] automatic BC0, [6] bunch disposition on,
//                   [7] ion pattern, [8] random source on
//     NUM_RANDOM RW number of random intervals loaded for a random burst
//     POT_BIAS   RW wiper code of potentiometer A; a write starts an SPI write
//     POT_LEVEL  RW wiper code of potentiometer B; a write starts an SPI write
//     STATUS     R  [3:0] stage busy, [4] SPI busy, [5] LV1A list being
//                   loaded from the random source
//     RNG_OVR    R  random intervals replaced before they were taken
//     T1_DROPS   R  fast commands merged into an identical pending one
//     BX         R  current bunch crossing number
//     RNG_SHORT  R  random transitions ignored for coming too soon
//     GAP_SUPP   R  LV1A suppressed because they fell in a bunch gap
//   bus_addr[15] = 1 : interval RAMs, bus_addr[13:12] = stage
//                   (fast_cmd_e), bus_addr[AW-1:0] = entry; RW, so a list
//                   loaded from the random source can be read back
// Start and stop are held until the next 40.08 MHz enable and are then
// presented for exactly that enable, so every stage sees them in the same
// 40.08 MHz cycle. The map, the bus and the counters are this design's own.
module host_interface
  import te_pkg::*;
#(
  parameter int unsigned DEPTH = BURST_DEPTH,
  parameter int unsigned IW    = INTERVAL_W,
  parameter int unsigned BXW   = $clog2(ORBIT_BX),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  // host bus
  input  logic                bus_wr,
  input  logic [15:0]         bus_addr,
  input  logic [31:0]         bus_wdata,
  output logic [31:0]         bus_rdata,
  // to the pattern generator
  output logic                start,
  output logic                stop,
  output emu_cfg_t            cfg,
  output logic [31:0]         num_random,
  output logic                ram_we,
  output logic [1:0]          ram_sel,
  output logic [AW-1:0]       ram_addr,
  output logic [IW-1:0]       ram_wdata,
  input  logic [IW-1:0]       ram_rdata,      // RAM entry addressed one clock before
  // to the potentiometer SPI controller
  output logic                pot_wr_bias,
  output logic                pot_wr_level,
  output logic [POT_W-1:0]    pot_bias,
  output logic [POT_W-1:0]    pot_level,
  // status
  input  logic [NUM_CMDS-1:0] stage_busy,
  input  logic                random_loading, // LV1A list being loaded from the random source
  input  logic                spi_busy,
  input  logic [31:0]         rng_overruns,
  input  logic                t1_dropped,   // level, counted once per ce
  input  logic                gap_suppressed, // level, counted once per ce
  input  logic [31:0]         rng_short_edges,
  input  logic [BXW-1:0]      bx
);
  logic        is_reg;
  logic [14:0] reg_no;
  logic [31:0] t1_drops;
  logic [31:0] gap_supp;
  logic [31:0] reg_rdata;   // register addressed one clock before
  logic        ram_read;    // the address one clock before was a RAM entry

  always_comb begin
    is_reg    = !bus_addr[15];
    reg_no    = bus_addr[14:0];
    ram_we    = bus_wr && !is_reg;
    ram_sel   = bus_addr[13:12];
    ram_addr  = bus_addr[AW-1:0];
    ram_wdata = IW'(bus_wdata);
    bus_rdata = ram_read ? 32'(ram_rdata) : reg_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start        <= 1'b0;
      stop         <= 1'b0;
      cfg          <= '0;
      num_random   <= '0;
      pot_bias     <= '0;
      pot_level    <= '0;
      pot_wr_bias  <= 1'b0;
      pot_wr_level <= 1'b0;
      t1_drops     <= '0;
      gap_supp     <= '0;
      reg_rdata    <= '0;
      ram_read     <= 1'b0;
    end else begin
      pot_wr_bias  <= 1'b0;
      pot_wr_level <= 1'b0;
      ram_read     <= !is_reg;
      if (ce) begin
        start <= 1'b0;
        stop  <= 1'b0;
        if (t1_dropped)     t1_drops <= t1_drops + 1'b1;
        if (gap_suppressed) gap_supp <= gap_supp + 1'b1;
      end
      if (bus_wr && is_reg) begin
        unique case (reg_no)
          REG_CONTROL: begin
            if (bus_wdata[0]) start <= 1'b1;
            if (bus_wdata[1]) stop  <= 1'b1;
          end
          REG_CONFIG:     cfg        <= emu_cfg_t'(bus_wdata[$bits(emu_cfg_t)-1:0]);
          REG_NUM_RANDOM: num_random <= bus_wdata;
          REG_POT_BIAS:   begin pot_bias  <= bus_wdata[POT_W-1:0]; pot_wr_bias  <= 1'b1; end
          REG_POT_LEVEL:  begin pot_level <= bus_wdata[POT_W-1:0]; pot_wr_level <= 1'b1; end
          default: ;
        endcase
      end
      unique case (reg_no)
        REG_CONFIG:     reg_rdata <= 32'(cfg);
        REG_NUM_RANDOM: reg_rdata <= num_random;
        REG_POT_BIAS:   reg_rdata <= 32'(pot_bias);
        REG_POT_LEVEL:  reg_rdata <= 32'(pot_level);
        REG_STATUS:     reg_rdata <= 32'({random_loading, spi_busy, stage_busy});
        REG_RNG_OVR:    reg_rdata <= rng_overruns;
        REG_T1_DROPS:   reg_rdata <= t1_drops;
        REG_BX:         reg_rdata <= 32'(bx);
        REG_RNG_SHORT:  reg_rdata <= rng_short_edges;
        REG_GAP_SUPP:   reg_rdata <= gap_supp;
        default:        reg_rdata <= '0;
      endcase
    end
  end
endmodule
