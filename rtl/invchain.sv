`timescale 1ns/1ps
// invchain: behavioural model of the forward-body-bias inverter chain array.
// This is a timing model of a full-custom analog experiment, not
// synthesizable logic.
//
// The array holds NCHAINS ring oscillators (38 on the chip), each NSTAGES
// stages long (61): one NAND gate followed by NSTAGES-1 inverters, with the
// last inverter fed back to the NAND. The NAND's other input is the chain's
// enable; with the enable low the NAND output is held high and the chain
// sleeps, with it high the ring has an odd number of inversions and
// oscillates with period 2 * NSTAGES * STAGE_NS. The default stage delay of
// 55 ps gives 6.71 ns (149 MHz), inside the 6.0 ns to 7.7 ns measured on
// the chip. The chain counts, the NAND plus inverters structure and the two
// select bits are the chip's; the stage delay is fitted to the measured
// period. For simulation speed each ring is modelled as a single inverting
// NAND with the delay of the whole ring, which has the same logic function
// and period as the stage-by-stage ring. The combinational loop through
// each ring is the oscillator itself and is intended.
//
// sel[1:0] sets how many chains run. The chip only says that the two bits
// control the number of chains switched on; the mapping here is this
// design's choice: 0 -> none (all asleep), 1 -> one chain, 2 -> half,
// 3 -> all. invout is the ring output of chain 0, which runs for every
// non-zero sel. Body-bias and supply pins (VPB, VNB, VDD of the array) are
// analog and not modelled; a different bias would show up here only as a
// different STAGE_NS.
module invchain #(
  parameter int unsigned NCHAINS  = 38,
  parameter int unsigned NSTAGES  = 61,
  parameter real         STAGE_NS = 0.055
) (
  input  logic [1:0] sel,
  output logic       invout
);
  logic [NCHAINS-1:0] en;
  logic [NCHAINS-1:0] ring_out;

  function automatic int unsigned n_on(logic [1:0] s);
    unique case (s)
      2'd0: return 0;
      2'd1: return 1;
      2'd2: return NCHAINS / 2;
      default: return NCHAINS;
    endcase
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < NCHAINS; i++) en[i] = (i < n_on(sel));
  end

  // The NAND and the NSTAGES-1 inverters of a chain are lumped into one
  // inverting element with the delay of the whole ring: an even number of
  // inverters after the NAND leaves the NAND's logic function unchanged.
  localparam real RING_NS = NSTAGES * STAGE_NS;

  for (genvar c = 0; c < NCHAINS; c++) begin : g_chain
    assign #(RING_NS) ring_out[c] = ~(en[c] & ring_out[c]);
  end

  assign invout = ring_out[0];
endmodule
