`timescale 1ns/1ps
// atc1_top: the ATC1 test chip.
//
// Two independent experiments share the die. The digital one is a colour
// conversion kernel reached from a host over the AHIP link:
//
//   pins --> ahip_slave --(wr_en, addr, wdata)--> test_harness --> rgbycc_kernel
//   pins <-- ahip_slave <--(rdata)--------------- test_harness <-- rgbycc_kernel
//                                                 test_harness --> rgbyccout pin
//
// The host writes an RGB pixel into in0 or in1 and the value it expects into
// test0 or test1; the kernel converts in0 and in1 on alternate cycles into
// out0 and out1; the host reads the results back, and the comparator pin
// rgbyccout reports whether the output selected by the last address matches
// its test register. The other experiment is the inverter chain array
// (invchain), with its own select pins and output, used to study forward
// body biasing; it is a behavioural timing model here.
//
// Everything digital runs on ext_clk. ext_req and ext_rst come from the host
// clock domain and are synchronized inside ahip_slave. The 8-bit
// bidirectional AHIP bus appears as ahip_i (pad input), ahip_o and ahip_oe
// (pad output and its enable). Only the low two address bits reach the
// harness; the other five are ignored.
module atc1_top
  import atc1_pkg::*;
(
  input  logic       ext_clk,
  input  logic       ext_rst,
  input  logic       ext_req,
  output logic       ext_ack,
  input  logic [7:0] ahip_i,
  output logic [7:0] ahip_o,
  output logic       ahip_oe,
  output logic       rgbyccout,
  input  logic [1:0] sel,
  output logic       invout
);
  logic        rst_core;
  logic        wr_en;
  logic [6:0]  addr;
  logic [23:0] ahip2core, core2ahip;
  logic        k_valid, k_tag, kr_valid, kr_tag;
  rgb_t        k_pix;
  ycc_t        kr_pix;

  ahip_slave u_ahip (
    .clk(ext_clk), .ext_rst, .rst_core,
    .ext_req, .ext_ack, .bus_i(ahip_i), .bus_o(ahip_o), .bus_oe(ahip_oe),
    .wr_en, .addr, .wdata(ahip2core), .rdata(core2ahip)
  );

  test_harness u_harness (
    .clk(ext_clk), .rst(rst_core),
    .wr_en, .addr(addr[1:0]), .wdata(ahip2core), .rdata(core2ahip), .rgbyccout,
    .k_valid, .k_tag, .k_pix, .kr_valid, .kr_tag, .kr_pix
  );

  rgbycc_kernel u_kernel (
    .clk(ext_clk), .rst(rst_core),
    .in_valid(k_valid), .in_tag(k_tag), .in_pix(k_pix),
    .out_valid(kr_valid), .out_tag(kr_tag), .out_pix(kr_pix)
  );

  invchain u_invchain (.sel, .invout);
endmodule
