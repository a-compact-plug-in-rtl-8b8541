// pot_spi_ctrl: writes the two digital potentiometers of the random source.
//
// Potentiometer A sets the bias voltage of the avalanche diode (and so the
// mean trigger rate); potentiometer B sets the DC level on which the
// amplified noise rides before the FPGA input gate. Writing a new code for
// either one queues an SPI transfer to that device; if both are queued, A
// goes first. A newer code for a potentiometer whose transfer is still queued
// replaces the queued one.
//
// SPI format (this design's choice; the document names only an SPI bus):
// one chip select per device (cs_n[0] = A, cs_n[1] = B), mode 0 (SCLK idles
// low, MOSI changes on the falling edge and is sampled on the rising edge),
// POT_W bits MSB first, SCLK = clk / (2*HALF_PERIOD). One SCLK half period
// separates chip-select edges from clock edges.
module pot_spi_ctrl #(
  parameter int unsigned POT_W       = 8,
  parameter int unsigned HALF_PERIOD = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_bias,
  input  logic [POT_W-1:0] bias_code,
  input  logic             wr_level,
  input  logic [POT_W-1:0] level_code,
  output logic             sclk,
  output logic             mosi,
  output logic [1:0]       cs_n,
  output logic             busy
);
  localparam int unsigned DW = $clog2(HALF_PERIOD + 1);
  localparam int unsigned BW = $clog2(POT_W + 1);

  typedef enum logic [1:0] {P_IDLE, P_LEAD, P_SHIFT, P_TRAIL} pstate_e;

  pstate_e          state;
  logic [1:0]       pend;
  logic [POT_W-1:0] pend_code [2];
  logic [POT_W-1:0] shreg;
  logic [BW-1:0]    bits_left;
  logic [DW-1:0]    div;
  logic             tick;

  always_comb begin
    tick = (div == DW'(HALF_PERIOD - 1));
    busy = (state != P_IDLE) || (pend != '0);
    mosi = shreg[POT_W-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      pend      <= '0;
      pend_code <= '{default: '0};
      shreg     <= '0;
      bits_left <= '0;
      div       <= '0;
      sclk      <= 1'b0;
      cs_n      <= 2'b11;
    end else begin
      // at most one device is selected at a time
      a_one_device: assert (cs_n != 2'b00);
      div <= tick ? '0 : div + 1'b1;
      unique case (state)
        P_IDLE: begin
          div <= '0;
          if (pend[0] || pend[1]) begin
            shreg     <= pend[0] ? pend_code[0] : pend_code[1];
            pend[pend[0] ? 0 : 1] <= 1'b0;
            bits_left <= BW'(POT_W);
            cs_n      <= pend[0] ? 2'b10 : 2'b01;
            state     <= P_LEAD;
          end
        end
        P_LEAD: if (tick) begin
          sclk  <= 1'b1;            // first rising edge samples the MSB
          state <= P_SHIFT;
        end
        P_SHIFT: if (tick) begin
          if (sclk) begin
            sclk      <= 1'b0;
            bits_left <= bits_left - 1'b1;
            if (bits_left == BW'(1)) state <= P_TRAIL;
            else                     shreg <= shreg << 1;
          end else begin
            sclk <= 1'b1;
          end
        end
        P_TRAIL: if (tick) begin
          cs_n  <= 2'b11;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
      // new codes queue after the dequeue above, so a write is never lost
      if (wr_bias)  begin pend[0] <= 1'b1; pend_code[0] <= bias_code;  end
      if (wr_level) begin pend[1] <= 1'b1; pend_code[1] <= level_code; end
    end
  end

endmodule
