// test_harness_tb: self-checking test of the register glue with the kernel.
//
// Drives the harness write strobe directly (no host interface), with the
// real kernel attached. Checks: the feed alternates in0/in1 every cycle;
// out0 and out1 hold the conversions of in0 and in1 (against ycc_ref_pkg);
// the read mux follows the address map; the comparator output rgbyccout is
// high when the selected output equals its test register and low when not;
// and a new input shows up in its output register no later than the kernel
// latency plus the feed phase and the write-back register.
`timescale 1ns/1ps
module test_harness_tb;
  import atc1_pkg::*;
  import ycc_ref_pkg::*;

  localparam int MAX_UPDATE = 7 + 3;

  logic clk = 0, rst = 1;
  logic wr_en = 0;
  logic [1:0] addr = '0;
  logic [23:0] wdata = '0;
  logic [23:0] rdata;
  logic rgbyccout;
  logic k_valid, k_tag, kr_valid, kr_tag;
  rgb_t k_pix;
  ycc_t kr_pix;

  int checks = 0, failures = 0;

  test_harness dut (.*);
  rgbycc_kernel u_k (.clk, .rst, .in_valid(k_valid), .in_tag(k_tag), .in_pix(k_pix),
                     .out_valid(kr_valid), .out_tag(kr_tag), .out_pix(kr_pix));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [1:0] a, logic [23:0] d);
    wr_en <= 1; addr <= a; wdata <= d;
    @(posedge clk);
    wr_en <= 0;
  endtask

  task automatic rd(logic [1:0] a, output logic [23:0] d);
    addr <= a;
    @(posedge clk);
    #1 d = rdata;
  endtask

  // Feed alternation monitor.
  logic last_tag;
  int   feed_cycles = 0;
  always @(posedge clk) begin
    if (!rst && k_valid) begin
      if (feed_cycles > 0)
        check(k_tag != last_tag, "feed does not alternate");
      last_tag <= k_tag;
      feed_cycles++;
    end
  end

  logic [23:0] v0, v1, d, e0, e1;
  int n;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int it = 0; it < 200; it++) begin
      v0 = $urandom; v1 = $urandom;
      e0 = ref_ycc(v0); e1 = ref_ycc(v1);
      wr(A_IN0, v0);
      // Time until out0 shows the new conversion.
      n = 0;
      addr <= 2'b00;
      while (n < 20) begin
        @(posedge clk); #1 n++;
        if (rdata == e0) break;
      end
      check(n <= MAX_UPDATE, $sformatf("out0 update took %0d cycles", n));
      wr(A_IN1, v1);
      wr(A_TEST0, e0);
      wr(A_TEST1, (it % 3 == 0) ? e1 ^ 24'h000100 : e1);
      repeat (MAX_UPDATE) @(posedge clk);
      rd(2'b00, d); check(d == e0, $sformatf("out0 via addr 00: %h vs %h", d, e0));
      rd(2'b01, d); check(d == e0, $sformatf("out0 via addr 01: %h vs %h", d, e0));
      @(posedge clk); #1;
      check(rgbyccout == 1'b1, "comparator missed out0 == test0");
      rd(2'b10, d); check(d == e1, $sformatf("out1 via addr 10: %h vs %h", d, e1));
      rd(2'b11, d); check(d == e1, $sformatf("out1 via addr 11: %h vs %h", d, e1));
      @(posedge clk); #1;
      check(rgbyccout == (it % 3 != 0), "comparator wrong for out1 vs test1");
    end
    check(feed_cycles > 1000, "feed never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
