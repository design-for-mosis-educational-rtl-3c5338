// rgbycc_kernel_tb: self-checking test of the colour conversion kernel.
//
// Feeds one pixel per cycle (corner values first, then random pixels, with
// a gap in the valid stream), and checks every result against a reference
// computed from the conversion equations in 64-bit arithmetic
// (ycc_ref_pkg). Also
// checks that each result appears exactly 7 cycles after its input and that
// the side-band tag travels with it.
`timescale 1ns/1ps
module rgbycc_kernel_tb;
  import atc1_pkg::*;
  import ycc_ref_pkg::*;

  localparam int LAT = 7;
  localparam int NVEC = 3000;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_tag = 0;
  rgb_t in_pix = '0;
  logic out_valid, out_tag;
  ycc_t out_pix;

  int checks = 0, failures = 0;
  int cycle = 0;

  rgbycc_kernel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results queue with the cycle each input was applied.
  ycc_t exp_q[$];
  logic tag_q[$];
  int   cyc_q[$];

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      exp_q.push_back(ycc_t'(ref_ycc(in_pix)));
      tag_q.push_back(in_tag);
      cyc_q.push_back(cycle);
    end
    if (!rst && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected output %h", out_pix);
      end else begin
        ycc_t e; logic t; int c;
        e = exp_q.pop_front(); t = tag_q.pop_front(); c = cyc_q.pop_front();
        checks++;
        if (out_pix !== e || out_tag !== t) begin
          failures++;
          $display("FAIL: got %h tag %0d, expected %h tag %0d", out_pix, out_tag, e, t);
        end
        checks++;
        if (cycle - c != LAT) begin
          failures++; $display("FAIL: latency %0d, expected %0d", cycle - c, LAT);
        end
      end
    end
  end

  rgb_t corners[8] = '{24'h000000, 24'hffffff, 24'hff0000, 24'h00ff00,
                       24'h0000ff, 24'h00ffff, 24'hff00ff, 24'h808080};

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    foreach (corners[i]) begin
      in_valid <= 1; in_pix <= corners[i]; in_tag <= i[0];
      @(posedge clk);
    end
    for (int i = 0; i < NVEC; i++) begin
      in_valid <= (i % 97) != 50;
      in_pix   <= rgb_t'($urandom);
      in_tag   <= 1'($urandom);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d results never appeared", exp_q.size());
    end
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
