// invchain_tb: self-checking test of the inverter chain array model.
//
// For each select value it lets the rings settle, then counts the edges of
// every chain's ring output over a fixed window and measures the period of
// invout. Checks: sel = 0 leaves every chain asleep and invout still; sel =
// 1, 2, 3 switch on 1, 19 and 38 chains; the period is 2 x 61 stages x
// 55 ps = 6.71 ns, inside the 6.0 to 7.7 ns band measured on silicon.
`timescale 1ns/1ps
module invchain_tb;
  localparam int NCH = 38;
  localparam real PERIOD = 2.0 * 61 * 0.055;

  logic [1:0] sel = 2'd0;
  logic invout;
  int checks = 0, failures = 0;

  invchain dut (.sel, .invout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int edges [NCH];
  logic [NCH-1:0] prev;
  bit counting = 0;
  always @(dut.ring_out) begin
    if (counting)
      for (int i = 0; i < NCH; i++) if (dut.ring_out[i] != prev[i]) edges[i]++;
    prev = dut.ring_out;
  end

  realtime t_rise[$];
  always @(posedge invout) if (counting) t_rise.push_back($realtime);

  int expect_on [4] = '{0, 1, 19, 38};

  initial begin
    for (int s = 0; s < 4; s++) begin
      int n_run;
      sel = 2'(s);
      #50;
      foreach (edges[i]) edges[i] = 0;
      t_rise.delete();
      counting = 1;
      #200;
      counting = 0;
      n_run = 0;
      foreach (edges[i]) if (edges[i] > 0) n_run++;
      check(n_run == expect_on[s],
            $sformatf("sel=%0d: %0d chains running, expected %0d", s, n_run, expect_on[s]));
      if (s == 0) begin
        check(t_rise.size() == 0, "invout toggles while asleep");
      end else begin
        realtime p;
        check(t_rise.size() >= 20, $sformatf("sel=%0d: only %0d invout edges", s, t_rise.size()));
        if (t_rise.size() >= 2) begin
          p = (t_rise[$] - t_rise[0]) / (t_rise.size() - 1);
          check(p > PERIOD - 0.02 && p < PERIOD + 0.02,
                $sformatf("sel=%0d: period %f ns, expected %f", s, p, PERIOD));
          check(p >= 6.0 && p <= 7.7, "period outside the measured band");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
