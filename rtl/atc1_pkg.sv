`timescale 1ns/1ps
// atc1_pkg: types and constants shared by the ATC1 test chip.
//
// Pixels travel as packed structs: an RGB pixel is {r, g, b} with red in the
// top byte, and a YCC pixel is {y, cb, cr} with luma in the top byte, chroma
// blue in the middle and chroma red in the low byte. This packing is the
// 24-bit word the host writes and reads over the host interface.
//
// The colour conversion coefficients are the fixed-point constants of the
// conversion (scale 2^16): Y = (0x4c8b R + 0x9646 G + 0x1d2f B) >> 16 and so
// on. They and the register map (two low address bits, one register pair per
// pixel slot) follow the published chip; the command byte layout of the host
// interface is this design's own choice and is described in ahip_slave.
package atc1_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycc_t;


  // Low two address bits. Writes go to in0/in1/test0/test1; reads of
  // addresses 0 and 1 return out0, reads of 2 and 3 return out1.
  typedef enum logic [1:0] {
    A_IN0   = 2'b00,
    A_IN1   = 2'b01,
    A_TEST0 = 2'b10,
    A_TEST1 = 2'b11
  } reg_addr_e;

  // Conversion coefficients, signed, scale 2^16.
  localparam int signed C_Y_R  =  'sh4c8b;
  localparam int signed C_Y_G  =  'sh9646;
  localparam int signed C_Y_B  =  'sh1d2f;
  localparam int signed C_CR_R =  'sh8000;
  localparam int signed C_CR_G = -'sh6b2f;
  localparam int signed C_CR_B = -'sh14d1;
  localparam int signed C_CB_R = -'sh2b33;
  localparam int signed C_CB_G = -'sh54cd;
  localparam int signed C_CB_B =  'sh8000;

  // Width of a signed weighted sum: |sum| < 2^16 * 255 < 2^24, plus sign.
  localparam int unsigned SUM_W = 26;

endpackage
