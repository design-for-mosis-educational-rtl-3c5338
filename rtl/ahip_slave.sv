`timescale 1ns/1ps
// ahip_slave: chip side of the asynchronous host interface protocol (AHIP).
//
// The host and the chip run on unrelated clocks and share an 8-bit
// bidirectional data bus and two handshake wires, req (host to chip) and ack
// (chip to host). The chip is always the slave. That much is the published
// chip's; the framing and the exact handshake below are this design's own.
//
// Handshake: four-phase, one byte per cycle of req. The host raises req, the
// chip answers with ack, the host drops req, the chip drops ack. For a byte
// the host sends, the host puts it on the bus before raising req and holds it
// until it sees ack. For a byte the chip sends, the host first releases the
// bus, then raises req; the chip drives the bus, raises ack one clock later,
// and releases the bus when it drops ack. req is brought into the chip clock
// domain through a two-flop synchronizer, and so is ext_rst (active high),
// which leaves as rst_core for the rest of the chip.
//
// Framing: a transaction is a command byte and three data bytes, most
// significant byte first. Command bit 7 is 1 for a write and 0 for a read;
// bits 6:0 are the register address. After the third byte of a write the
// chip pulses wr_en for one clock with addr and wdata (ahip2core). For a read
// the chip samples rdata (core2ahip), which the core returns for addr, when
// the command byte's handshake completes, and sends it back.
//
// The pad side is split into bus_i, bus_o and bus_oe; the pad cell joins them
// into the bidirectional pins.
module ahip_slave (
  input  logic        clk,
  input  logic        ext_rst,
  output logic        rst_core,
  // pins
  input  logic        ext_req,
  output logic        ext_ack,
  input  logic [7:0]  bus_i,
  output logic [7:0]  bus_o,
  output logic        bus_oe,
  // core side
  output logic        wr_en,
  output logic [6:0]  addr,
  output logic [23:0] wdata,
  input  logic [23:0] rdata
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACK} state_e;

  logic [1:0] rst_sync;
  logic [1:0] req_sync;
  logic       req_s;
  state_e     state;
  logic [1:0] idx;        // 0: command byte, 1..3: data bytes
  logic       is_write;
  logic [23:0] shreg;

  always_ff @(posedge clk) begin
    rst_sync <= {rst_sync[0], ext_rst};
    req_sync <= {req_sync[0], ext_req};
  end
  assign rst_core = rst_sync[1];
  assign req_s    = req_sync[1];

  always_ff @(posedge clk) begin
    if (rst_core) begin
      state    <= S_IDLE;
      idx      <= '0;
      is_write <= 1'b0;
      addr     <= '0;
      shreg    <= '0;
      bus_o    <= '0;
      bus_oe   <= 1'b0;
      ext_ack  <= 1'b0;
      wr_en    <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      unique case (state)
        S_IDLE: if (req_s) begin
          if (idx == 2'd0) begin
            is_write <= bus_i[7];
            addr     <= bus_i[6:0];
            ext_ack  <= 1'b1;
            state    <= S_ACK;
          end else if (is_write) begin
            shreg   <= {shreg[15:0], bus_i};
            ext_ack <= 1'b1;
            state   <= S_ACK;
          end else begin
            bus_o  <= shreg[23:16];
            bus_oe <= 1'b1;
            state  <= S_SETUP;
          end
        end
        S_SETUP: begin
          ext_ack <= 1'b1;
          state   <= S_ACK;
        end
        S_ACK: if (!req_s) begin
          ext_ack <= 1'b0;
          bus_oe  <= 1'b0;
          state   <= S_IDLE;
          if (idx == 2'd0) begin
            if (!is_write) shreg <= rdata;
            idx <= 2'd1;
          end else begin
            if (!is_write) shreg <= {shreg[15:0], 8'h00};
            if (idx == 2'd3) begin
              idx   <= 2'd0;
              wr_en <= is_write;
            end else begin
              idx <= idx + 2'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wdata = shreg;

  // Handshake rules, as seen in the chip clock domain.
  a_ack_rise: assert property (@(posedge clk) disable iff (ext_rst || rst_core)
                               $rose(ext_ack) |-> req_s);
  a_ack_fall: assert property (@(posedge clk) disable iff (ext_rst || rst_core)
                               $fell(ext_ack) |-> !req_s);
  a_oe_read:  assert property (@(posedge clk) disable iff (ext_rst || rst_core)
                               bus_oe |-> (!is_write && idx != 2'd0));
endmodule
