// clock_phase: derives the slower LHC-related timing from the 160.32 MHz clock.
//
// The whole emulator runs on one 160.32 MHz clock (four times the 40.08 MHz
// LHC bunch clock). A free-running two-bit phase counter splits each
// 40.08 MHz period into four slots, 0..3. The slot number itself drives the
// line encoders (phase[1] is the 80.16 MHz channel select, ~phase[1] the
// 40.08 MHz clock level), and
//   ce40  - high in slot 3; logic of the 40.08 MHz domain updates on it, so
//           its registers change at the start of slot 0.
// Running the 40.08 MHz logic on clock enables of the faster clock, rather
// than on a second clock, is this design's choice; it keeps the CLK+T1 and
// TTC encoders, which work on 80.16 and 160.32 MHz edges, in one domain.
module clock_phase (
  input  logic       clk,      // 160.32 MHz
  input  logic       rst_n,    // asynchronous, active low
  output logic [1:0] phase,    // slot within the 40.08 MHz period
  output logic       ce40
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 2'd0;
    else        phase <= phase + 2'd1;

  always_comb ce40 = (phase == 2'd3);
endmodule
