// clk_t1_encoder: "CLK+T1" line code, clock and T1 on one wire.
//
// The 40.08 MHz clock is sent with one pulse removed in every clock period
// in which T1 is '1'; a receiver recovers the clock with a PLL and reads T1
// from the missing pulses. Both outputs are registers on the 160.32 MHz
// clock, so they are free of glitches: clk40_out is the plain clock
// (high in slots 1 and 2 of the four 160.32 MHz slots of a 40.08 MHz period,
// one slot after the internal phase because of the output register) and
// clk_t1_out is the same wave with the high phase suppressed while t1 = 1.
// t1 must be stable for the whole 40.08 MHz period (it changes on ce40).
// The pulse-removal rule is the document's; the register stage and the
// duty cycle are this design's choices.
module clk_t1_encoder (
  input  logic       clk,        // 160.32 MHz
  input  logic       rst_n,
  input  logic [1:0] phase,      // from clock_phase
  input  logic       t1,
  output logic       clk40_out,
  output logic       clk_t1_out
);
  logic hi;
  always_comb hi = ~phase[1];    // slots 0 and 1: clock high

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk40_out  <= 1'b0;
      clk_t1_out <= 1'b0;
    end else begin
      clk40_out  <= hi;
      clk_t1_out <= hi & ~t1;
    end
  end
endmodule
