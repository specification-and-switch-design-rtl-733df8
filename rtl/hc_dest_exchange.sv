// hc_dest_exchange: destination exchange of the first randomized variant.
//
// Compares the packet's immediate destination with the processor id. When
// they are equal the packet has reached its intermediate destination and the
// final destination replaces the immediate one; otherwise the immediate
// destination passes through unchanged. Combinational.
module hc_dest_exchange #(
  parameter int D = 4
) (
  input  logic [D-1:0] idest,
  input  logic [D-1:0] fdest,
  input  logic [D-1:0] pid,
  output logic [D-1:0] dest,
  output logic         exchanged
);
  logic [D-1:0] diff;
  logic         differ;
  hc_comparator #(.D(D)) u_cmp (.dest(idest), .pid(pid), .diff(diff), .route(differ));
  always_comb begin
    exchanged = !differ && (idest != fdest);
    dest      = differ ? idest : fdest;
  end
endmodule
