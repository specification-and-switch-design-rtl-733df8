// hc_packet_buffer: the input queue of one incoming channel.
//
// Holds at most one packet: a packet that is not at its destination is
// always routed, so the input queue never needs more. It loads a packet
// on a valid/ready handshake and releases it when `consume` is high (the
// packet was written into an output queue or delivered). It is ready when
// empty or when its packet leaves in the same cycle, so a channel can carry
// one packet per cycle. If the packet's output queue is full the packet
// stays and the buffer refuses new ones, which back-pressures the upstream
// output queue. Registered; reset empties the buffer.
module hc_packet_buffer #(
  parameter int PKT_W = 21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PKT_W-1:0] in_pkt,
  output logic             in_ready,
  output logic             valid,
  output logic [PKT_W-1:0] pkt,
  input  logic             consume
);
  assign in_ready = !valid || consume;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      pkt   <= '0;
    end else begin
      if (in_valid && in_ready) begin
        valid <= 1'b1;
        pkt   <= in_pkt;
      end else if (consume) begin
        valid <= 1'b0;
      end
    end
  end

  // A packet can only leave if there is one.
  a_consume_valid: assert property (@(posedge clk) disable iff (!rst_n) consume |-> valid);
endmodule
