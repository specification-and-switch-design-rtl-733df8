// hc_mask_gen: mask generator of the second randomized variant.
//
// mask_in[D-1:0] is the set T of dimensions the packet may still consider;
// mask_in[D] is the "all dimensions fixed" flag. After the packet is sent
// along dimension idx, every dimension up to and including idx has been
// decided and is removed from T. A forced transmission empties T. The flag
// is set whenever T becomes empty, after which switches route the packet
// deterministically to its final destination. Combinational.
module hc_mask_gen #(
  parameter int D = 4,
  localparam int IW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [D:0]    mask_in,
  input  logic [IW-1:0] idx,
  input  logic          forced,
  output logic [D:0]    mask_out
);
  logic [D-1:0] t;
  always_comb begin
    t = mask_in[D-1:0];
    for (int j = 0; j < D; j++)
      if (forced || j <= int'(idx)) t[j] = 1'b0;
    mask_out = {mask_in[D] | (t == '0), t};
  end
endmodule
