// tb_t1_encoder: checks priority selection and serial T1 coding.
//
// A receiver in the testbench decodes the t1 line: a '1' starts a code and
// the next two bits give the command. Directed cases check the code of each
// command (Resynch 110, BC0 101, CalPulse 111, LV1A 100), the one-cycle
// latency from request to start bit, the priority order when all four are
// requested at once (sent back to back, twelve busy cycles), and the merge
// of a request into a pending one. A random phase then compares the decoded
// command stream with a behavioural priority model.
`timescale 1ns/1ps
module tb_t1_encoder;
  import te_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  logic [1:0] ph = 0;
  always #3.12 clk = ~clk;
  always @(posedge clk) ph <= ph + 1;
  assign ce = (ph == 3);

  logic [3:0] req = 0;
  logic t1, busy;
  logic [3:0] sent, dropped;

  t1_encoder dut (.clk(clk), .rst_n(rst_n), .ce(ce), .req(req), .t1(t1),
                  .busy(busy), .sent(sent), .dropped(dropped));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receiver: decoded commands and the cycle of their start bit
  int unsigned n40 = 0;
  int rx_cmd[$];
  int unsigned rx_cycle[$];
  int rx_state = 0;
  int unsigned rx_start;
  logic [1:0] rx_bits;
  int n_dropped = 0;
  always @(posedge clk) if (ce) begin
    n40 <= n40 + 1;
    if (|dropped) n_dropped += $countones(dropped);
    case (rx_state)
      0: if (t1) begin rx_state = 1; rx_start = n40; end
      1: begin rx_bits[1] = t1; rx_state = 2; end
      2: begin rx_bits[0] = t1; rx_state = 0;
                rx_cmd.push_back(int'(rx_bits)); rx_cycle.push_back(rx_start); end
    endcase
  end

  task automatic wait_ce(); @(posedge clk iff ce); endtask
  // drive req for the 40.08 MHz cycle that ends at the next ce; returns its number
  task automatic request(input logic [3:0] r, output int unsigned cyc);
    @(negedge clk iff ph == 0); req = r; cyc = n40;
    wait_ce(); #0.1 req = 0;
  endtask

  initial begin
    int unsigned c;
    int n_busy;
    logic [2:0] code;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (4) wait_ce();

    // each command alone: code, latency
    for (int k = 0; k < 4; k++) begin
      rx_cmd.delete(); rx_cycle.delete();
      request(4'(1 << k), c);
      repeat (6) wait_ce();
      check(rx_cmd.size() == 1, $sformatf("cmd %0d: %0d codes received", k, rx_cmd.size()));
      if (rx_cmd.size() == 1) begin
        check(rx_cmd[0] == k, $sformatf("cmd %0d decoded as %0d", k, rx_cmd[0]));
        check(rx_cycle[0] == c + 1, $sformatf("cmd %0d: start bit %0d cycles after request",
                                              k, rx_cycle[0] - c));
      end
    end
    code = t1_code(CMD_RESYNCH);  check(code == 3'b110, "Resynch code 110");
    code = t1_code(CMD_BC0);      check(code == 3'b101, "BC0 code 101");
    code = t1_code(CMD_CALPULSE); check(code == 3'b111, "CalPulse code 111");
    code = t1_code(CMD_LV1A);     check(code == 3'b100, "LV1A code 100");

    // all four at once: priority order, back to back
    rx_cmd.delete(); rx_cycle.delete();
    request(4'b1111, c);
    n_busy = 0;
    repeat (16) begin wait_ce(); if (busy) n_busy++; end
    check(rx_cmd.size() == 4, "four codes after simultaneous request");
    if (rx_cmd.size() == 4) begin
      check(rx_cmd[0] == CMD_RESYNCH && rx_cmd[1] == CMD_BC0 &&
            rx_cmd[2] == CMD_CALPULSE && rx_cmd[3] == CMD_LV1A,
            $sformatf("order %0d %0d %0d %0d", rx_cmd[0], rx_cmd[1], rx_cmd[2], rx_cmd[3]));
      for (int i = 0; i < 4; i++)
        check(rx_cycle[i] == c + 1 + 3 * i, $sformatf("code %0d starts at +%0d", i, rx_cycle[i] - c));
    end
    check(n_busy == 12, $sformatf("line busy %0d cycles, expected 12", n_busy));

    // merge: LV1A requested twice while Resynch holds the line
    rx_cmd.delete(); rx_cycle.delete(); n_dropped = 0;
    request(4'b0101, c);       // Resynch + LV1A
    request(4'b0001, c);       // LV1A again, still pending
    repeat (10) wait_ce();
    check(n_dropped == 1, $sformatf("%0d drops reported, expected 1", n_dropped));
    check(rx_cmd.size() == 2, $sformatf("%0d codes after merge, expected 2", rx_cmd.size()));

    // random traffic against a behavioural model
    begin
      int exp_cmd[$];
      int model_pend[4];
      int model_bits;
      int exp_drop;
      rx_cmd.delete(); rx_cycle.delete(); n_dropped = 0; exp_drop = 0;
      model_pend = '{0, 0, 0, 0}; model_bits = 0;
      for (int cyc = 0; cyc < 3000; cyc++) begin
        logic [3:0] r;
        for (int k = 0; k < 4; k++) r[k] = ($urandom_range(99) < 7);
        @(negedge clk iff ph == 0); req = r;
        // model: this cycle's requests join the pending set
        for (int k = 0; k < 4; k++) if (r[k]) begin
          if (model_pend[k]) exp_drop++;
          model_pend[k] = 1;
        end
        if (model_bits > 0) model_bits--;
        else begin
          fast_cmd_e order [4] = '{CMD_RESYNCH, CMD_BC0, CMD_CALPULSE, CMD_LV1A};
          foreach (order[j]) if (model_pend[int'(order[j])]) begin
            exp_cmd.push_back(int'(order[j]));
            model_pend[int'(order[j])] = 0;
            model_bits = 2;
            break;
          end
        end
        wait_ce(); #0.1 req = 0;
      end
      repeat (30) wait_ce();
      check(rx_cmd.size() == exp_cmd.size(),
            $sformatf("random: %0d codes, model %0d", rx_cmd.size(), exp_cmd.size()));
      for (int i = 0; i < exp_cmd.size() && i < rx_cmd.size(); i++)
        if (rx_cmd[i] != exp_cmd[i]) begin
          check(0, $sformatf("random: code %0d is %0d, model %0d", i, rx_cmd[i], exp_cmd[i]));
          break;
        end
      check(n_dropped == exp_drop, $sformatf("random: %0d drops, model %0d", n_dropped, exp_drop));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
