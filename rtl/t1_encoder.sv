// t1_encoder: fast-command priority selection and serial T1 encoding.
//
// Each of the four fast commands arrives as a one-cycle request (req, indexed
// by te_pkg::fast_cmd_e) from the pattern generator. A request is remembered
// as pending until it is sent. Whenever the serial line is free, the highest
// priority pending command (Resynch, BC0, CalPulse, LV1A) is chosen and its
// three-bit T1 code, '1' followed by the two command bits, is shifted out MSB
// first, one bit per 40.08 MHz cycle. A new command may follow the last bit
// of the previous one without an idle cycle. A request that arrives while
// the same command is still pending cannot be told apart from it: it is
// merged and reported on `dropped`.
//
// Timing: a request seen in cycle k (sampled on ce at its end) starts the
// line in cycle k+1 if the line is free, so t1 is '1' in cycle k+1 and the
// code occupies cycles k+1..k+3. t1 is a register that changes on ce.
// Pending flags and the merge rule are this design's choices; the document
// states the priorities, the codes and that a state machine enforces the
// priority.
module t1_encoder
  import te_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [NUM_CMDS-1:0] req,
  output logic                t1,
  output logic                busy,      // a code is on the line
  output logic [NUM_CMDS-1:0] sent,      // one-cycle pulse: code of this command started
  output logic [NUM_CMDS-1:0] dropped    // one-cycle pulse: request merged into a pending one
);
  typedef enum logic [1:0] {T_IDLE, T_BIT1, T_BIT2} tstate_e;

  tstate_e             state;
  logic [1:0]          payload;
  logic [NUM_CMDS-1:0] pending;
  logic [NUM_CMDS-1:0] pend_all;
  logic                pick_any;
  fast_cmd_e           pick;

  // Priority selection among the pending commands and this cycle's requests.
  always_comb begin
    pend_all = pending | req;
    pick_any = 1'b0;
    pick     = CMD_LV1A;
    for (int i = NUM_CMDS - 1; i >= 0; i--)
      if (pend_all[PRIORITY_ORDER[i]]) begin
        pick_any = 1'b1;
        pick     = PRIORITY_ORDER[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      payload <= '0;
      pending <= '0;
      t1      <= 1'b0;
      busy    <= 1'b0;
      sent    <= '0;
      dropped <= '0;
    end else if (ce) begin
      dropped <= pending & req;
      sent    <= '0;
      unique case (state)
        T_BIT1: begin
          t1      <= payload[1];
          busy    <= 1'b1;
          state   <= T_BIT2;
          pending <= pend_all;
        end
        T_BIT2: begin
          t1      <= payload[0];
          busy    <= 1'b1;
          state   <= T_IDLE;
          pending <= pend_all;
        end
        default: begin  // T_IDLE: line free, start the next code
          if (pick_any) begin
            logic [2:0] code;
            code    = t1_code(pick);
            t1      <= code[2];
            busy    <= 1'b1;
            payload <= code[1:0];
            state   <= T_BIT1;
            pending <= pend_all & ~(NUM_CMDS'(1) << pick);
            sent    <= NUM_CMDS'(1) << pick;
          end else begin
            t1      <= 1'b0;
            busy    <= 1'b0;
            pending <= pend_all;
          end
        end
      endcase
    end
  end
endmodule
