// vlm_trunc_mult: multiplier with the VLM's middle-bit truncation.
//
// Computes floor_Q((alpha * a * b) mod 1) for two Q-bit fractions a and b,
// with alpha = 2^A and A = ceil(Q/2). The full product a*b has 2Q fraction
// bits; multiplying by alpha and taking mod 1 drops its A most significant
// bits, and floor_Q keeps the next Q bits. The result is therefore the
// product slice [2Q-A-1 : Q-A], i.e. bits [47:16] for Q = 32. Keeping the
// middle of the product makes every output bit depend on many partial
// products, which is the reason for the choice of alpha.
//
// Because the top A bits of the product are never used, synthesis removes
// the partial products that only feed them; for Q = 32 what remains is about
// the size of a 24x32 array, the figure quoted for this block. The product
// is written here as a plain multiplication reduced to 2Q-A bits and left to
// the synthesis tool to prune.
//
// Purely combinational; no clock.
module vlm_trunc_mult #(
  parameter int unsigned Q = 32   // operand and result width
) (
  input  logic [Q-1:0] a,
  input  logic [Q-1:0] b,
  output logic [Q-1:0] p          // floor_Q((2^A * a * b) mod 1)
);

  localparam int unsigned A  = (Q + 1) / 2;   // log2(alpha)
  localparam int unsigned PW = 2 * Q - A;     // product bits that survive mod 1

  logic [PW-1:0] prod;

  always_comb begin
    prod = PW'(a) * PW'(b);                   // product modulo 2^(2Q-A)
    p    = prod[PW-1 -: Q];
  end

endmodule
