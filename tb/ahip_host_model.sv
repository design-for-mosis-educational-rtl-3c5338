// ahip_host_model: behavioural model of the host end of the AHIP link, the
// part the tester board's FPGA plays. Not part of the chip.
//
// Runs on its own clock hclk, unrelated to the chip clock, and synchronizes
// ack through two flops. Tasks:
//   do_reset()              holds ext_rst high for a while, then releases it
//   write_reg(addr, data)   command byte {1, addr} then three data bytes
//   read_reg(addr, data)    command byte {0, addr} then reads three bytes
// Each byte is one four-phase req/ack cycle: for a byte to the chip the model
// drives host_o before raising req; for a byte from the chip it releases the
// bus (host_oe low) first and samples bus_i once the synchronized ack is
// high. The counters n_bytes and n_handshake_waits give the testbench
// evidence of traffic and of the handshake waiting on the chip.
module ahip_host_model (
  input  logic       hclk,
  output logic       ext_rst,
  output logic       ext_req,
  input  logic       ext_ack,
  input  logic [7:0] bus_i,
  output logic [7:0] host_o,
  output logic       host_oe
);
  logic [1:0] ack_sync = '0;
  logic ack_s;
  int n_bytes = 0;
  int n_handshake_waits = 0;

  initial begin
    ext_rst = 1'b1;
    ext_req = 1'b0;
    host_o  = '0;
    host_oe = 1'b0;
  end

  always @(posedge hclk) ack_sync <= {ack_sync[0], ext_ack};
  assign ack_s = ack_sync[1];

  task automatic do_reset();
    ext_rst <= 1'b1;
    ext_req <= 1'b0;
    host_oe <= 1'b0;
    repeat (10) @(posedge hclk);
    ext_rst <= 1'b0;
    repeat (10) @(posedge hclk);
  endtask

  task automatic wait_ack(logic level);
    @(posedge hclk);
    while (ack_s != level) begin
      n_handshake_waits++;
      @(posedge hclk);
    end
  endtask

  task automatic send_byte(logic [7:0] b);
    host_o  <= b;
    host_oe <= 1'b1;
    @(posedge hclk);
    ext_req <= 1'b1;
    wait_ack(1'b1);
    ext_req <= 1'b0;
    wait_ack(1'b0);
    n_bytes++;
  endtask

  task automatic recv_byte(output logic [7:0] b);
    host_oe <= 1'b0;
    @(posedge hclk);
    ext_req <= 1'b1;
    wait_ack(1'b1);
    b = bus_i;
    ext_req <= 1'b0;
    wait_ack(1'b0);
    n_bytes++;
  endtask

  task automatic write_reg(logic [6:0] a, logic [23:0] d);
    send_byte({1'b1, a});
    send_byte(d[23:16]);
    send_byte(d[15:8]);
    send_byte(d[7:0]);
  endtask

  task automatic read_reg(logic [6:0] a, output logic [23:0] d);
    send_byte({1'b0, a});
    recv_byte(d[23:16]);
    recv_byte(d[15:8]);
    recv_byte(d[7:0]);
  endtask
endmodule
