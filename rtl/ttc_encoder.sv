// ttc_encoder: TTC-like line code, two time-multiplexed channels in
// bi-phase mark at 160.32 MBaud.
//
// Each 40.08 MHz period carries two 12.5 ns bit cells: channel A (the T1
// bit) in the first half and channel B in the second, selected by the
// 80.16 MHz clock. The resulting 80.16 Mb/s stream is bi-phase mark
// encoded with the 160.32 MHz clock: the line toggles at the start of every
// cell, and toggles again in the middle of a cell that carries '1'. The
// code is DC-free and keeps transitions for clock recovery. Channel B,
// which in the TTC system carries broadcast and addressed commands, is not
// used by this emulator and is tied to '1' by the caller.
//
// Timing: the output is a register on the 160.32 MHz clock. The four
// half-cells of a 40.08 MHz period are produced in slots 0..3 (A start,
// A middle, B start, B middle) and appear one clock later. a and b must be
// stable for the whole period. The multiplexing and the code follow the
// document; the output register is this design's choice.
module ttc_encoder (
  input  logic       clk,        // 160.32 MHz
  input  logic       rst_n,
  input  logic [1:0] phase,      // from clock_phase
  input  logic       chan_a,     // T1
  input  logic       chan_b,
  output logic       ttc_out
);
  logic cell_bit;   // bit of the current cell (80.16 MHz multiplexer)
  logic toggle;

  always_comb begin
    cell_bit = phase[1] ? chan_b : chan_a;
    // slot 0 / 2: cell boundary, always a transition
    // slot 1 / 3: mid-cell, a transition for a '1'
    toggle = phase[0] ? cell_bit : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ttc_out <= 1'b0;
    else        ttc_out <= ttc_out ^ toggle;
  end
endmodule
