`timescale 1ns/1ps
// test_harness: register glue between the host interface and the kernel.
//
// The host writes 24-bit words into four registers and reads two:
//   addr[1:0]  write      read
//      00      in0        out0
//      01      in1        out0
//      10      test0      out1
//      11      test1      out1
// (this map is the published chip's). The kernel is fed in0 and in1 on
// alternate cycles without pause, and each kernel result is written back to
// out0 or out1 on alternate cycles, so out0 always holds the conversion of
// in0 and out1 that of in1. The pairing is kept by a tag bit that travels
// through the kernel with each pixel (this design's way of doing it), so it
// holds for any kernel latency.
//
// The test registers hold the values the host expects. An equality
// comparator checks the output register currently selected for reading
// (core2ahip) against the test register of the same pair (test0 for out0,
// test1 for out1) and drives rgbyccout, registered, high on a match. Which
// registers the comparator sees follows the chip's block diagram; the pairing
// by addr[1] is this design's reading of it.
//
// Interface: wr_en is a one-cycle write strobe with addr and wdata; rdata is
// the combinational read mux on addr. k_* goes to the kernel input, kr_*
// comes back from the kernel output. rst is synchronous, active high, and
// clears every register and the feed phase.
module test_harness
  import atc1_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // host interface side
  input  logic        wr_en,
  input  logic [1:0]  addr,
  input  logic [23:0] wdata,
  output logic [23:0] rdata,
  output logic        rgbyccout,
  // kernel feed
  output logic        k_valid,
  output logic        k_tag,
  output rgb_t        k_pix,
  // kernel results
  input  logic        kr_valid,
  input  logic        kr_tag,
  input  ycc_t        kr_pix
);
  rgb_t in0, in1;
  ycc_t test0, test1;
  ycc_t out0, out1;
  logic phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      in0 <= '0; in1 <= '0; test0 <= '0; test1 <= '0;
    end else if (wr_en) begin
      unique case (reg_addr_e'(addr))
        A_IN0:   in0   <= rgb_t'(wdata);
        A_IN1:   in1   <= rgb_t'(wdata);
        A_TEST0: test0 <= ycc_t'(wdata);
        A_TEST1: test1 <= ycc_t'(wdata);
      endcase
    end
  end

  // Alternating feed: in0 on even cycles, in1 on odd cycles.
  always_ff @(posedge clk) begin
    if (rst) phase <= 1'b0;
    else     phase <= ~phase;
  end

  assign k_valid = ~rst;
  assign k_tag   = phase;
  assign k_pix   = phase ? in1 : in0;

  // Results come back alternately and are steered by their tag.
  always_ff @(posedge clk) begin
    if (rst) begin
      out0 <= '0; out1 <= '0;
    end else if (kr_valid) begin
      if (kr_tag) out1 <= kr_pix;
      else        out0 <= kr_pix;
    end
  end

  assign rdata = addr[1] ? out1 : out0;

  // Hardware equality check.
  ycc_t test_sel;
  assign test_sel = addr[1] ? test1 : test0;

  always_ff @(posedge clk) begin
    if (rst) rgbyccout <= 1'b0;
    else     rgbyccout <= (rdata == test_sel);
  end
endmodule
