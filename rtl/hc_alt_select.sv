// hc_alt_select: alternate destination selector (second randomized variant).
//
// When the dimension selector found no dimension to route along, the packet
// is forced to a neighbour chosen at random: the random bits taken modulo D
// give the channel (uniform when D is a power of two, this design's choice).
// Otherwise the selected dimension passes through. `forced` tells the mask
// generator to empty the mask. Combinational.
module hc_alt_select #(
  parameter int D = 4,
  localparam int IW = (D > 1) ? $clog2(D) : 1
) (
  input  logic [IW-1:0] rnd,
  input  logic          found,
  input  logic [IW-1:0] sel_idx,
  output logic [IW-1:0] idx,
  output logic          forced
);
  always_comb begin
    forced = !found;
    if (found) idx = sel_idx;
    else       idx = IW'(32'(rnd) % D);
  end
endmodule
