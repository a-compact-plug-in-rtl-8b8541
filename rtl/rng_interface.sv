// rng_interface: turns the true-random pulse train into random intervals.
//
// The analog avalanche-noise source is compared against a programmable DC
// level by an FPGA input gate, giving a logic signal with randomly spaced
// transitions. This block synchronises that signal (two flip-flops on the
// 160.32 MHz clock), detects its rising transitions and measures the time
// between successive ones in 40.08 MHz cycles; each measurement is a random
// number, loaded into the LV1A interval list during a random load.
//
// Measured value and handshake: a one-entry holding register (rnd_value,
// rnd_valid) that the loader empties with rnd_pop on ce. A measurement
// arriving while the register is still full replaces the old value and
// counts one overrun. A transition less than MIN_INTERVAL cycles after the
// last accepted one is ignored and counted in short_edges, so every value
// obeys the minimum trigger spacing. The first transition after enable only
// starts the clock. The counter saturates at its maximum. Using rising
// transitions only, the holding register and the dead time are this design's
// choices; the document states only that the intervals between transitions
// are measured.
module rng_interface #(
  parameter int unsigned INTERVAL_W   = 32,
  parameter int unsigned MIN_INTERVAL = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,          // 40.08 MHz enable
  input  logic                  enable,
  input  logic                  gate_in,     // asynchronous comparator output
  output logic                  rnd_valid,
  output logic [INTERVAL_W-1:0] rnd_value,
  input  logic                  rnd_pop,
  output logic [31:0]           overruns,
  output logic [31:0]           short_edges
);
  logic [2:0]            sync;       // two synchroniser stages + edge history
  logic                  edge_seen;  // rising transition since the last ce
  logic                  armed;      // a start transition has been seen
  logic [INTERVAL_W-1:0] elapsed;    // 40.08 MHz cycles since the last accepted edge

  logic rise;
  always_comb rise = sync[1] & ~sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      edge_seen   <= 1'b0;
      armed       <= 1'b0;
      elapsed     <= '0;
      rnd_valid   <= 1'b0;
      rnd_value   <= '0;
      overruns    <= '0;
      short_edges <= '0;
    end else begin
      sync <= {sync[1:0], gate_in};
      if (rise && !ce) edge_seen <= 1'b1;
      if (ce) begin
        edge_seen <= 1'b0;
        if (rnd_pop) rnd_valid <= 1'b0;
        if (!enable) begin
          armed <= 1'b0;
        end else if (edge_seen || rise) begin
          if (!armed) begin
            armed   <= 1'b1;
            elapsed <= INTERVAL_W'(1);
          end else if (elapsed >= INTERVAL_W'(MIN_INTERVAL)) begin
            // elapsed = 40.08 MHz cycles from the last accepted edge to this one
            rnd_value <= elapsed;
            rnd_valid <= 1'b1;
            if (rnd_valid && !rnd_pop) overruns <= overruns + 1'b1;
            elapsed   <= INTERVAL_W'(1);
          end else begin
            short_edges <= short_edges + 1'b1;
            elapsed     <= elapsed + 1'b1;
          end
        end else if (!(&elapsed)) begin
          elapsed <= elapsed + 1'b1;
        end
      end
    end
  end
endmodule
