`timescale 1ns/1ps
// atc1_top_tb: end-to-end test of the ATC1 chip through its pins.
//
// The host model (ahip_host_model) runs on its own 7.3 ns clock; the chip
// runs at 400 MHz (2.5 ns), the fastest clock used in the silicon shmoo
// test. The test runs the chip's random vector procedure NVEC = 40,000 times:
//   1. write in0 with a random RGB value
//   2. write test0 with the expected YCC value for it
//   3. write in1 with another random RGB value
//   4. write test1 with its expected YCC value
//   5. read out0 and check it
//   6. read out1 and check it
// Expected values come from ycc_ref_pkg. Every 50th vector gets a corrupted
// test value, and rgbyccout must then read low while it reads high for the
// correct ones. Reads go alternately through both addresses of each output.
// Other mechanisms exercised and counted: a reset in mid-run (outputs return
// to the conversion of a zero pixel), the handshake waiting on the chip,
// and every setting of the inverter chain select (sleeping with sel = 0,
// oscillating otherwise). A mechanism that never happens counts a failure.
module atc1_top_tb;
  import ycc_ref_pkg::*;

  localparam int NVEC = 40000;

  logic ext_clk = 0, hclk = 0;
  logic ext_rst, ext_req, ext_ack;
  logic [7:0] ahip_o, host_o, bus;
  logic ahip_oe, host_oe;
  logic rgbyccout;
  logic [1:0] sel = 2'd0;
  logic invout;

  int checks = 0, failures = 0;

  always #1.25 ext_clk = ~ext_clk;
  always #3.65 hclk = ~hclk;

  assign bus = ahip_oe ? ahip_o : host_o;

  atc1_top dut (.ext_clk, .ext_rst, .ext_req, .ext_ack, .ahip_i(bus), .ahip_o, .ahip_oe,
                .rgbyccout, .sel, .invout);
  ahip_host_model host (.hclk, .ext_rst, .ext_req, .ext_ack, .bus_i(bus), .host_o, .host_oe);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int contention = 0;
  always @(posedge ext_clk) if (ahip_oe && host_oe) contention++;

  // Mechanism counters.
  int n_wr [4];
  int n_rd_out0 = 0, n_rd_out1 = 0;
  int n_cmp_match = 0, n_cmp_mismatch = 0;
  int n_reset = 0;
  int n_sel_run [4];

  int inv_edges = 0;
  always @(invout) inv_edges++;

  task automatic wr(logic [1:0] a, logic [23:0] d);
    host.write_reg({5'($urandom), a}, d);
    n_wr[a]++;
  endtask

  task automatic rd(logic [1:0] a, output logic [23:0] d);
    host.read_reg({5'($urandom), a}, d);
    if (a[1]) n_rd_out1++; else n_rd_out0++;
  endtask

  // rgbyccout after a read has settled (the pin is registered in the chip
  // domain; give it a few host cycles).
  task automatic check_cmp(bit expect_match, string what);
    repeat (3) @(posedge hclk);
    check(rgbyccout == expect_match, $sformatf("rgbyccout %0d, expected %0d (%s)",
                                               rgbyccout, expect_match, what));
    if (rgbyccout) n_cmp_match++; else n_cmp_mismatch++;
  endtask

  task automatic run_chain(logic [1:0] s);
    int e0;
    sel = s;
    #20;
    e0 = inv_edges;
    #100;
    if (s == 2'd0) check(inv_edges == e0, "inverter chain runs while asleep");
    else check(inv_edges - e0 >= 20, $sformatf("inverter chain sel=%0d not oscillating", s));
    if ((s == 2'd0) == (inv_edges == e0)) n_sel_run[s]++;
    sel = 2'd0;
    #20;
  endtask

  logic [23:0] v0, v1, e0, e1, t0, t1, d;

  initial begin
    foreach (n_wr[i]) n_wr[i] = 0;
    foreach (n_sel_run[i]) n_sel_run[i] = 0;
    host.do_reset();
    n_reset++;
    for (int s = 0; s < 4; s++) run_chain(2'(s));
    // Right after reset all inputs are zero.
    rd(2'b00, d);
    check(d == ref_ycc(24'h0), $sformatf("out0 after reset %h", d));
    for (int it = 0; it < NVEC; it++) begin
      bit bad;
      bad = (it % 50 == 7);
      v0 = $urandom; v1 = $urandom;
      e0 = ref_ycc(v0); e1 = ref_ycc(v1);
      t0 = bad ? e0 ^ (24'h1 << (it % 24)) : e0;
      t1 = e1;
      wr(2'b00, v0);
      wr(2'b10, t0);
      wr(2'b01, v1);
      wr(2'b11, t1);
      rd({1'b0, it[0]}, d);
      check(d == e0, $sformatf("vector %0d out0 %h expected %h", it, d, e0));
      check_cmp(!bad, "out0 vs test0");
      rd({1'b1, it[1]}, d);
      check(d == e1, $sformatf("vector %0d out1 %h expected %h", it, d, e1));
      check_cmp(1'b1, "out1 vs test1");
      if (it == NVEC / 2) begin
        host.do_reset();
        n_reset++;
        rd(2'b10, d);
        check(d == ref_ycc(24'h0), $sformatf("out1 after mid-run reset %h", d));
      end
    end
    check(contention == 0, "bus driven from both ends");
    // Every mechanism must have happened.
    foreach (n_wr[i]) check(n_wr[i] > 0, $sformatf("no write to register %0d", i));
    check(n_rd_out0 > 0 && n_rd_out1 > 0, "an output register was never read");
    check(n_cmp_match > 0, "comparator never matched");
    check(n_cmp_mismatch > 0, "comparator never flagged a mismatch");
    check(n_reset == 2, "mid-run reset not applied");
    check(host.n_handshake_waits > 0, "handshake never waited");
    foreach (n_sel_run[i]) check(n_sel_run[i] > 0, $sformatf("chain select %0d not seen", i));
    $display("mechanisms: writes %0d/%0d/%0d/%0d reads out0 %0d out1 %0d match %0d mismatch %0d resets %0d waits %0d",
             n_wr[0], n_wr[1], n_wr[2], n_wr[3], n_rd_out0, n_rd_out1, n_cmp_match,
             n_cmp_mismatch, n_reset, host.n_handshake_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
