// hc_comparator: the switch's destination comparator.
//
// Bitwise xor of a destination id and the switch's processor id. A non-zero
// result means the packet is not yet at that destination and must be routed;
// the set bits are the dimensions still to be fixed (routing by bit-fixing).
// Purely combinational.
module hc_comparator #(
  parameter int D = 4
) (
  input  logic [D-1:0] dest,
  input  logic [D-1:0] pid,
  output logic [D-1:0] diff,
  output logic         route
);
  always_comb begin
    diff  = dest ^ pid;
    route = |diff;
  end
endmodule
