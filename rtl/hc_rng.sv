// hc_rng: pseudo-random bit source.
//
// Stands for the "random destination generator" and "random bit string
// generator" of the second randomized switch, and for the generator of
// intermediate destinations of the first. A 32-bit xorshift register
// (x ^= x<<13; x ^= x>>17; x ^= x<<5) advances every cycle; the low OUT_W
// bits are the output. Reset loads SEED (a zero seed is replaced by 1,
// since xorshift stays at zero). The construction is this design's choice.
module hc_rng #(
  parameter int          OUT_W = 4,
  parameter logic [31:0] SEED  = 32'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [OUT_W-1:0] rnd
);
  logic [31:0] x, n1, n2, n3;
  always_comb begin
    n1 = x ^ (x << 13);
    n2 = n1 ^ (n1 >> 17);
    n3 = n2 ^ (n2 << 5);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x <= (SEED == 32'h0) ? 32'h1 : SEED;
    else        x <= n3;
  end
  assign rnd = x[OUT_W-1:0];
endmodule
