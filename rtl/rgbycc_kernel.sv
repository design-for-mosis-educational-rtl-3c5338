`timescale 1ns/1ps
// rgbycc_kernel: pipelined RGB to YCrCb colour conversion.
//
// Converts one 24-bit RGB pixel per clock cycle into a 24-bit YCC pixel:
//   Y  =  (0x4c8b R + 0x9646 G + 0x1d2f B) >> 16
//   Cr = (((0x8000 R - 0x6b2f G - 0x14d1 B) >> 16) + 128) mod 256
//   Cb = (((-0x2b33 R - 0x54cd G + 0x8000 B) >> 16) + 128) mod 256
// with arithmetic shifts, and packs {Y, Cb, Cr}. These equations and the
// constants are those of the published chip, which only says that the kernel
// is built from many adders and deeply pipelined.
//
// How it is built here (this design's choice): each constant multiplication
// is expanded into shifted partial products, one per input bit, so every
// output channel is the sum of 24 partial products. The three sums are
// formed by pipelined binary adder trees (adder_tree_pipe), one register
// level per tree level. The top byte of each sum is the shifted result.
//
// Timing: the input pixel is registered, the trees take clog2(24) = 5
// cycles, and the output is registered, so out_* follows in_* by
// LATENCY = 7 cycles, with a new pixel accepted every cycle. in_tag is a
// side-band bit carried alongside each pixel (the harness uses it to steer
// results to out0 or out1). Only the valid bit is reset (rst, synchronous,
// active high); data registers are not.
module rgbycc_kernel
  import atc1_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_tag,
  input  rgb_t in_pix,
  output logic out_valid,
  output logic out_tag,
  output ycc_t out_pix
);
  localparam int unsigned NPP      = 24;              // partial products per channel
  localparam int unsigned TREE_LAT = $clog2(NPP);
  localparam int unsigned LATENCY  = TREE_LAT + 2;

  typedef logic signed [SUM_W-1:0] sum_t;

  rgb_t pix_q;
  always_ff @(posedge clk) pix_q <= in_pix;

  // One partial product: coefficient shifted by the bit position, or zero.
  function automatic sum_t pp(logic bit_v, sum_t coef, int unsigned sh);
    return bit_v ? (coef <<< sh) : '0;
  endfunction

  sum_t pp_y [NPP];
  sum_t pp_cr[NPP];
  sum_t pp_cb[NPP];

  always_comb begin
    for (int unsigned i = 0; i < 8; i++) begin
      pp_y [i]    = pp(pix_q.r[i], sum_t'(C_Y_R),  i);
      pp_y [8+i]  = pp(pix_q.g[i], sum_t'(C_Y_G),  i);
      pp_y [16+i] = pp(pix_q.b[i], sum_t'(C_Y_B),  i);
      pp_cr[i]    = pp(pix_q.r[i], sum_t'(C_CR_R), i);
      pp_cr[8+i]  = pp(pix_q.g[i], sum_t'(C_CR_G), i);
      pp_cr[16+i] = pp(pix_q.b[i], sum_t'(C_CR_B), i);
      pp_cb[i]    = pp(pix_q.r[i], sum_t'(C_CB_R), i);
      pp_cb[8+i]  = pp(pix_q.g[i], sum_t'(C_CB_G), i);
      pp_cb[16+i] = pp(pix_q.b[i], sum_t'(C_CB_B), i);
    end
  end

  sum_t s_y, s_cr, s_cb;

  adder_tree_pipe #(.N(NPP), .W(SUM_W)) u_tree_y  (.clk(clk), .in(pp_y),  .sum(s_y));
  adder_tree_pipe #(.N(NPP), .W(SUM_W)) u_tree_cr (.clk(clk), .in(pp_cr), .sum(s_cr));
  adder_tree_pipe #(.N(NPP), .W(SUM_W)) u_tree_cb (.clk(clk), .in(pp_cb), .sum(s_cb));

  always_ff @(posedge clk) begin
    out_pix.y  <= s_y[23:16];
    out_pix.cr <= s_cr[23:16] + 8'd128;
    out_pix.cb <= s_cb[23:16] + 8'd128;
  end

  // Valid and tag travel in a shift register matched to the datapath.
  logic [LATENCY-1:0] v_sr;
  logic [LATENCY-1:0] t_sr;
  always_ff @(posedge clk) begin
    if (rst) v_sr <= '0;
    else     v_sr <= {v_sr[LATENCY-2:0], in_valid};
    t_sr <= {t_sr[LATENCY-2:0], in_tag};
  end

  assign out_valid = v_sr[LATENCY-1];
  assign out_tag   = t_sr[LATENCY-1];
endmodule
