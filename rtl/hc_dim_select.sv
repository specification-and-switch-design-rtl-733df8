// hc_dim_select: dimension selection of the second randomized variant.
//
// `decide` holds one routing decision per dimension (1 = route along it this
// step) and `mask` the dimensions the packet may still consider. The
// selected dimension is the smallest one that is both allowed and chosen,
// which is the document's "smallest index j in T" applied to all
// dimensions at once. `found` is low if every allowed decision was "do not
// route". Combinational.
module hc_dim_select #(
  parameter int D = 4,
  localparam int IW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [D-1:0]  decide,
  input  logic [D-1:0]  mask,
  output logic [IW-1:0] idx,
  output logic          found
);
  hc_priority_encoder #(.D(D)) u_enc (.vec(decide & mask), .idx(idx), .found(found));
endmodule
