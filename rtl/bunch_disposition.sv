// bunch_disposition: emulates which LHC bunch slots hold a bunch.
//
// A bunch-crossing counter runs over one orbit of ORBIT_BX = 3564 slots of
// 25 ns, advancing on every 40.08 MHz enable. A fill map, computed at
// elaboration time, says for every slot whether a bunch is there. The
// pattern generator uses `filled` to suppress triggers that would fall in a
// gap, and orbit_start (slot 0) for automatic BC0.
//
// The document states only that proton and ion dispositions are emulated.
// The maps below are this design's approximation of the nominal LHC filling
// schemes, built from trains of TRAIN_LEN = 72 slots (one PS batch):
//  * trains are grouped into SPS injections of 3 or 4 trains,
//    in the order 3,3,4 repeated three times, then 3,3,3 (39 trains),
//  * PS_GAP = 8 empty slots between trains of one injection,
//  * SPS_GAP = 38 empty slots between injections,
//  * the rest of the orbit, 122 slots, is the abort gap.
// Proton mode fills every slot of a train (2808 bunches, 25 ns spacing);
// ion mode fills every ION_SPACING-th slot of a train (100 ns spacing,
// 702 bunches). All of these numbers are parameters.
//
// Outputs are registered and describe the current 40.08 MHz cycle: they
// change together with the other 40.08 MHz logic.
module bunch_disposition #(
  parameter int unsigned ORBIT_BX    = 3564,
  parameter int unsigned TRAIN_LEN   = 72,
  parameter int unsigned PS_GAP      = 8,
  parameter int unsigned SPS_GAP     = 38,
  parameter int unsigned ION_SPACING = 4,
  localparam int unsigned BXW        = $clog2(ORBIT_BX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic           ion_mode,
  output logic [BXW-1:0] bx,
  output logic           filled,
  output logic           orbit_start
);
  localparam int unsigned N_INJ = 12;
  localparam int unsigned TRAINS_PER_INJ [N_INJ] = '{3, 3, 4, 3, 3, 4, 3, 3, 4, 3, 3, 3};

  // Fill map: bit b is 1 when slot b holds a bunch. spacing = 1 for protons.
  function automatic logic [ORBIT_BX-1:0] fill_map(int unsigned spacing);
    logic [ORBIT_BX-1:0] m;
    int unsigned pos;
    m   = '0;
    pos = 0;
    for (int unsigned i = 0; i < N_INJ; i++) begin
      for (int unsigned t = 0; t < TRAINS_PER_INJ[i]; t++) begin
        for (int unsigned b = 0; b < TRAIN_LEN; b++)
          if (pos + b < ORBIT_BX && b % spacing == 0) m[pos + b] = 1'b1;
        pos += TRAIN_LEN;
        if (t + 1 < TRAINS_PER_INJ[i]) pos += PS_GAP;
      end
      pos += SPS_GAP;
    end
    return m;
  endfunction

  localparam logic [ORBIT_BX-1:0] PROTON_MAP = fill_map(1);
  localparam logic [ORBIT_BX-1:0] ION_MAP    = fill_map(ION_SPACING);

  logic [BXW-1:0] bx_next;
  always_comb bx_next = (bx == BXW'(ORBIT_BX - 1)) ? '0 : bx + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx          <= '0;
      filled      <= PROTON_MAP[0];
      orbit_start <= 1'b1;
    end else if (ce) begin
      bx          <= bx_next;
      filled      <= ion_mode ? ION_MAP[bx_next] : PROTON_MAP[bx_next];
      orbit_start <= (bx_next == '0);
    end
  end
endmodule
