// tb_interval_ram: checks the interval RAM at its full 1024 x 32 size.
// Every entry must read as zero before it is written; random writes are
// then read back through both ports, one clock after the address is
// presented, against a copy kept by the testbench. A read and a write of the
// same entry in one clock return the old value on both ports.
`timescale 1ns/1ps
module tb_interval_ram;
  localparam int DEPTH = 1024;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #3.12 clk = ~clk;

  logic          we = 0;
  logic [AW-1:0] addr_a = 0, raddr = 0;
  logic [31:0]   wdata = 0, rdata, rdata_a;
  logic [31:0]   model [DEPTH];

  interval_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (
    .clk(clk), .we(we), .addr_a(addr_a), .wdata(wdata), .rdata_a(rdata_a), .raddr(raddr),
    .rdata(rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_check(input int a);
    int b;
    b = (a * 7 + 3) % DEPTH;       // port A reads another entry meanwhile
    @(negedge clk); raddr = AW'(a); addr_a = AW'(b);
    @(negedge clk);
    check(rdata == model[a], $sformatf("entry %0d reads %h, expected %h", a, rdata, model[a]));
    check(rdata_a == model[b], $sformatf("port A: entry %0d reads %h, expected %h", b, rdata_a, model[b]));
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    for (int a = 0; a < DEPTH; a += 37) read_check(a);
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); we = 1; addr_a = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // read-during-write of one entry returns the old value
    @(negedge clk); we = 1; addr_a = 5; raddr = 5; wdata = 32'hDEAD_BEEF;
    @(negedge clk); we = 0;
    check(rdata == model[5] && rdata_a == model[5], "read during write returns the old value");
    model[5] = 32'hDEAD_BEEF;
    @(negedge clk);
    check(rdata == model[5] && rdata_a == model[5], "new value readable one clock later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
