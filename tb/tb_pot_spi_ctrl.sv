// tb_pot_spi_ctrl: checks the potentiometer SPI writes with a mode-0 slave
// model per chip select. Cases: one write to each device, both written in
// the same clock (A must go first), a second code for A while its first
// transfer is still queued behind B (the newest code must be sent), and the
// SCLK period (2 x HALF_PERIOD clocks). The chip selects must never both be
// low and MOSI must not change while SCLK is high.
`timescale 1ns/1ps
module tb_pot_spi_ctrl;
  localparam int HP = 4;
  logic clk = 0, rst_n = 0;
  always #3.12 clk = ~clk;

  logic wr_bias = 0, wr_level = 0;
  logic [7:0] bias_code = 0, level_code = 0;
  logic sclk, mosi, busy;
  logic [1:0] cs_n;

  pot_spi_ctrl #(.POT_W(8), .HALF_PERIOD(HP)) dut (
    .clk(clk), .rst_n(rst_n), .wr_bias(wr_bias), .bias_code(bias_code),
    .wr_level(wr_level), .level_code(level_code), .sclk(sclk), .mosi(mosi),
    .cs_n(cs_n), .busy(busy));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slave model: frames as (device, value, bit count)
  int rx_dev[$], rx_val[$], rx_bits[$];
  logic [7:0] sh;
  int nb, dev_now;
  logic prev_sclk = 0, prev_mosi = 0;
  logic [1:0] prev_cs = 2'b11;
  int unsigned clk_count = 0, last_rise = 0, period_err = 0, mosi_err = 0, cs_err = 0;
  always @(posedge clk) if (rst_n) begin
    clk_count++;
    if (cs_n == 2'b00) cs_err++;
    if (prev_cs == 2'b11 && cs_n != 2'b11) begin nb = 0; sh = 0; dev_now = cs_n[0] ? 1 : 0; end
    if (cs_n != 2'b11 && sclk && !prev_sclk) begin
      sh = {sh[6:0], mosi}; nb++;
      if (nb > 1 && clk_count - last_rise != 2 * HP) period_err++;
      last_rise = clk_count;
    end
    if (sclk && prev_sclk && mosi != prev_mosi) mosi_err++;
    if (prev_cs != 2'b11 && cs_n == 2'b11) begin
      rx_dev.push_back(dev_now); rx_val.push_back(sh); rx_bits.push_back(nb);
    end
    prev_sclk = sclk; prev_mosi = mosi; prev_cs = cs_n;
  end

  task automatic wait_done();
    repeat (2) @(posedge clk);
    #0.1;
    while (busy) begin @(posedge clk); #0.1; end
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_frame(input int i, input int dev, input int val);
    check(rx_dev.size() > i, $sformatf("frame %0d missing", i));
    if (rx_dev.size() > i) begin
      check(rx_dev[i] == dev, $sformatf("frame %0d to device %0d, expected %0d", i, rx_dev[i], dev));
      check(rx_val[i] == val, $sformatf("frame %0d value %h, expected %h", i, rx_val[i], val));
      check(rx_bits[i] == 8, $sformatf("frame %0d has %0d bits", i, rx_bits[i]));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk); rst_n = 1;
    @(negedge clk); wr_bias = 1; bias_code = 8'hA5;
    @(negedge clk); wr_bias = 0;
    wait_done();
    expect_frame(0, 0, 8'hA5);
    @(negedge clk); wr_level = 1; level_code = 8'h3C;
    @(negedge clk); wr_level = 0;
    wait_done();
    expect_frame(1, 1, 8'h3C);
    // both at once: A first
    @(negedge clk); wr_bias = 1; bias_code = 8'h81; wr_level = 1; level_code = 8'h7E;
    @(negedge clk); wr_bias = 0; wr_level = 0;
    wait_done();
    expect_frame(2, 0, 8'h81);
    expect_frame(3, 1, 8'h7E);
    // B in flight, A queued twice: only the newest A code is sent
    @(negedge clk); wr_level = 1; level_code = 8'h11;
    @(negedge clk); wr_level = 0;
    repeat (5) @(negedge clk);
    wr_bias = 1; bias_code = 8'h22; @(negedge clk);
    bias_code = 8'h33; @(negedge clk); wr_bias = 0;
    wait_done();
    expect_frame(4, 1, 8'h11);
    expect_frame(5, 0, 8'h33);
    check(rx_dev.size() == 6, $sformatf("%0d frames, expected 6", rx_dev.size()));
    check(period_err == 0, $sformatf("%0d SCLK periods not %0d clocks", period_err, 2 * HP));
    check(mosi_err == 0, "MOSI stable while SCLK high");
    check(cs_err == 0, "never both chip selects low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
