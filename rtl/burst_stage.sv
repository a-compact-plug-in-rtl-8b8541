// burst_stage: one programmable burst generator.
//
// Produces a burst of one-cycle pulses at the 40.08 MHz rate whose spacing is
// given by a list of intervals t1, t2, ..., tN counted in 40.08 MHz cycles:
// pulse k comes t1 + ... + tk cycles after the cycle in which start was seen
// (figure "programmable or random burst" of the design description).
//
// As in the described hardware it is an address counter, the interval RAM
// (outside this module, synchronous read) and a decrementing counter. The
// address pointer rests at 0, so t1 waits at the RAM output. On start, t1 is
// loaded into the down counter and the pointer moves on; when the counter
// reaches its terminal count the pulse is issued, the value now at the RAM
// output is loaded and the pointer advances again. The burst ends after
// the pulse whose successor entry is zero or below MIN_INTERVAL, or after
// DEPTH pulses. Intervals are held in INTERVAL_W bits, so the longest is
// 2^INTERVAL_W - 1 cycles. Whether the list was written by the host or
// loaded from the random source makes no difference here.
//
// Timing: all state changes on ce (the 40.08 MHz enable). pulse is high for
// exactly one ce period. start and stop are sampled on ce.
module burst_stage #(
  parameter int unsigned DEPTH        = 1024,
  parameter int unsigned INTERVAL_W   = 32,
  parameter int unsigned MIN_INTERVAL = 3,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  start,
  input  logic                  stop,
  // interval RAM read port
  output logic [AW-1:0]         ram_raddr,
  input  logic [INTERVAL_W-1:0] ram_rdata,
  // outputs
  output logic                  pulse,
  output logic                  busy
);
  logic                  running;
  logic [AW:0]           addr;       // one bit wider: DEPTH means "list exhausted"
  logic [INTERVAL_W-1:0] cnt;

  logic ram_legal, tc;
  always_comb begin
    ram_legal = (ram_rdata >= INTERVAL_W'(MIN_INTERVAL));
    tc        = running && (cnt == INTERVAL_W'(1));
    ram_raddr = addr[AW-1:0];
    busy      = running;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      addr    <= '0;
      cnt     <= '0;
      pulse   <= 1'b0;
    end else if (ce) begin
      // a running counter never holds a value below the terminal count
      if (running) a_cnt_nonzero: assert (cnt != '0);
      pulse <= 1'b0;
      if (stop) begin
        running <= 1'b0;
        addr    <= '0;
      end else if (!running) begin
        if (start && ram_legal) begin
          cnt     <= ram_rdata - 1'b1;
          addr    <= addr + 1'b1;
          running <= 1'b1;
        end
      end else if (tc) begin
        pulse <= 1'b1;
        if (addr == (AW+1)'(DEPTH) || !ram_legal) begin
          running <= 1'b0;
          addr    <= '0;
        end else begin
          cnt  <= ram_rdata;
          addr <= addr + 1'b1;
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
