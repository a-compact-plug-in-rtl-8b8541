// te_pkg: types and constants shared by the trigger emulator.
//
// The four fast commands, their priority and their T1 code follow the
// published T1 scheme: a command is sent as three serial bits, a leading '1'
// followed by a two-bit command number ("00" LV1A, "01" BC0, "10" Resynch,
// "11" CalPulse). Priority, highest first: Resynch, BC0, CalPulse, LV1A.
// The configuration struct and the register numbers are this design's own
// choice for the host register map.
package te_pkg;

  // Fast command numbers; the value is the two payload bits of the T1 code.
  typedef enum logic [1:0] {
    CMD_LV1A     = 2'b00,
    CMD_BC0      = 2'b01,
    CMD_RESYNCH  = 2'b10,
    CMD_CALPULSE = 2'b11
  } fast_cmd_e;

  localparam int unsigned NUM_CMDS     = 4;
  localparam int unsigned INTERVAL_W   = 32;    // interval values, in 40.08 MHz cycles
  localparam int unsigned BURST_DEPTH  = 1024;  // entries per interval RAM
  localparam int unsigned MIN_INTERVAL = 3;     // smallest legal trigger spacing
  localparam int unsigned ORBIT_BX     = 3564;  // bunch crossings per LHC orbit
  localparam int unsigned POT_W        = 8;     // digital potentiometer wiper code

  // Commands in order of decreasing priority.
  localparam fast_cmd_e PRIORITY_ORDER [NUM_CMDS] =
    '{CMD_RESYNCH, CMD_BC0, CMD_CALPULSE, CMD_LV1A};

  // Three-bit T1 code, transmitted MSB first.
  function automatic logic [2:0] t1_code(fast_cmd_e cmd);
    return {1'b1, cmd};
  endfunction

  // Run-time configuration written by the host.
  typedef struct packed {
    logic       rng_enable;      // accept random intervals from the noise source
    logic       ion_mode;        // bunch disposition: 1 = ion pattern, 0 = proton
    logic       disp_enable;     // suppress LV1A in empty bunch slots
    logic       auto_bc0;        // BC0 once per orbit instead of from its stage
    logic       random_trigger;  // LV1A stage loads random intervals
    logic [NUM_CMDS-1:0] cmd_mask;  // 1 = command suppressed, bit = fast_cmd_e
  } emu_cfg_t;

  // Host register numbers (word addresses, bus_addr[15] = 0).
  localparam logic [14:0] REG_CONTROL    = 15'h0000;  // W: bit0 start, bit1 stop
  localparam logic [14:0] REG_CONFIG     = 15'h0001;  // RW: emu_cfg_t
  localparam logic [14:0] REG_NUM_RANDOM = 15'h0002;  // RW: random triggers per burst
  localparam logic [14:0] REG_POT_BIAS   = 15'h0003;  // RW: potentiometer A (diode bias)
  localparam logic [14:0] REG_POT_LEVEL  = 15'h0004;  // RW: potentiometer B (comparator level)
  localparam logic [14:0] REG_STATUS     = 15'h0005;  // R : stage busy, SPI busy
  localparam logic [14:0] REG_RNG_OVR    = 15'h0006;  // R : random intervals lost
  localparam logic [14:0] REG_T1_DROPS   = 15'h0007;  // R : fast commands merged/lost
  localparam logic [14:0] REG_BX         = 15'h0008;  // R : current bunch crossing
  localparam logic [14:0] REG_RNG_SHORT  = 15'h0009;  // R : random edges ignored (too close)
  localparam logic [14:0] REG_GAP_SUPP   = 15'h000A;  // R : LV1A suppressed in bunch gaps

endpackage
