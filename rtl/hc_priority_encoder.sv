// hc_priority_encoder: index of the lowest set bit.
//
// Chooses the outgoing channel of a packet: the smallest dimension in which
// its destination and the switch id differ. Bit 0 is the first dimension.
// `found` is low when no bit is set (idx is then 0). Combinational.
module hc_priority_encoder #(
  parameter int D = 4,
  localparam int IW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [D-1:0]  vec,
  output logic [IW-1:0] idx,
  output logic          found
);
  always_comb begin
    idx   = '0;
    found = 1'b0;
    for (int i = D - 1; i >= 0; i--) begin
      if (vec[i]) begin
        idx   = IW'(i);
        found = 1'b1;
      end
    end
  end
endmodule
