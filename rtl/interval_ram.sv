// interval_ram: the interval list of one burst stage.
//
// Dual-port RAM of the kind FPGA block RAM provides. Port A (addr_a) is the
// host's: it writes interval values t1, t2, ... (we, wdata) and reads them
// back (rdata_a), for instance to save a list loaded from the random source.
// Port B is the burst stage's read port. Both reads are synchronous:
// rdata_a = mem[addr_a] and rdata = mem[raddr] one clock after the address
// is presented; a read of the entry being written returns the old value.
// A burst ends at the first zero (or otherwise illegal) entry, so the RAM
// starts zeroed, as FPGA block RAM does after configuration; this makes a
// stage that was never loaded produce an empty burst. Depth 1024 x 32 bit
// follows the document (bursts of up to 1024 triggers, intervals up to 2^32
// cycles); the port arrangement is this design's choice.
module interval_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: write and read back
  input  logic             we,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata_a,
  // port B: read
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr_a] <= wdata;
    rdata_a <= mem[addr_a];
    rdata   <= mem[raddr];
  end
endmodule
