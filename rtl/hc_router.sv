// hc_router: assigns a packet to one output queue.
//
// Turns the channel index chosen by the encoder (or the dimension selector)
// into a one-hot write request towards the D output queues of the switch.
// No request is raised when `valid` is low. Combinational; the packet itself
// travels beside the request on the switch's shared write bus.
module hc_router #(
  parameter int D = 4,
  localparam int IW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          valid,
  input  logic [IW-1:0] idx,
  output logic [D-1:0]  req
);
  always_comb begin
    req = '0;
    for (int i = 0; i < D; i++)
      req[i] = valid && (idx == IW'(i));
  end
endmodule
