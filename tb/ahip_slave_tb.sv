// ahip_slave_tb: self-checking test of the AHIP slave against the host model.
//
// The host model runs on a clock unrelated to the chip clock (7.3 ns against
// 5 ns). A small register file in the testbench stands in for the core: it
// takes the write strobe and returns data for the read address. The test
// checks every write (address and data, exactly one strobe per write), reads
// back random data from random addresses, checks that host and chip never
// drive the bus at the same time, and checks the handshake cost: a write of
// four bytes must finish within a fixed number of host cycles.
`timescale 1ns/1ps
module ahip_slave_tb;
  logic clk = 0, hclk = 0;
  logic ext_rst, ext_req, ext_ack, rst_core;
  logic [7:0] bus_o, host_o, bus;
  logic bus_oe, host_oe;
  logic wr_en;
  logic [6:0] addr;
  logic [23:0] wdata, rdata;

  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;
  always #3.65 hclk = ~hclk;

  assign bus = bus_oe ? bus_o : host_o;

  ahip_slave dut (.clk, .ext_rst, .rst_core, .ext_req, .ext_ack, .bus_i(bus), .bus_o,
                  .bus_oe, .wr_en, .addr, .wdata, .rdata);
  ahip_host_model host (.hclk, .ext_rst, .ext_req, .ext_ack, .bus_i(bus), .host_o, .host_oe);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Core stand-in.
  logic [23:0] mem [128];
  int n_wr = 0;
  logic [6:0] last_wa;
  logic [23:0] last_wd;
  always @(posedge clk) begin
    if (wr_en) begin
      n_wr++; last_wa = addr; last_wd = wdata;
      mem[addr] <= wdata;
    end
  end
  assign rdata = mem[addr];

  // Bus contention monitor.
  int contention = 0;
  always @(posedge clk) if (bus_oe && host_oe) contention++;

  logic [23:0] d, q;
  logic [6:0] a;
  int t0, n_before;
  int hcyc = 0;
  always @(posedge hclk) hcyc++;

  initial begin
    foreach (mem[i]) mem[i] = 24'(i * 24'h010203);
    host.do_reset();
    for (int it = 0; it < 300; it++) begin
      a = 7'($urandom); d = 24'($urandom);
      n_before = n_wr;
      t0 = hcyc;
      host.write_reg(a, d);
      // ahip write cost: 4 bytes x (req rise + sync + ack fall) host cycles
      check(hcyc - t0 <= 4 * 16, $sformatf("write took %0d host cycles", hcyc - t0));
      repeat (4) @(posedge clk);
      check(n_wr == n_before + 1, "write strobe count");
      check(last_wa == a && last_wd == d,
            $sformatf("write got %h:%h expected %h:%h", last_wa, last_wd, a, d));
      a = 7'($urandom);
      host.read_reg(a, q);
      check(q == mem[a], $sformatf("read %h: got %h expected %h", a, q, mem[a]));
    end
    check(contention == 0, "bus driven from both ends");
    check(n_wr == 300, "total writes");
    check(host.n_handshake_waits > 0, "handshake never waited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
