// vlm_core: one step of the Variational Logistic Map (VLM).
//
//   VLM(gamma, x) = floor_Q( alpha * floor_Q((alpha*gamma*x) mod 1) * (1 - x) mod 1 )
//
// with alpha = 2^ceil(Q/2) and gamma, x Q-bit fractions in (0,1). The data
// path is the one of the generator's VLM core: a zero detector conditions
// gamma and x, a first truncating multiplier forms p = floor_Q((alpha*gamma*x)
// mod 1), a Q-bit subtractor forms 1 - x (as 2^Q - x, which fits in Q bits
// because the zero detector never lets x be 0), and a second truncating
// multiplier forms the result from p and 1 - x. Every mod-1 and truncation is
// a bit selection, so the core costs two multipliers and one subtractor.
//
// Purely combinational: the result is valid one propagation delay after
// gamma and x. The caller holds the state register.
module vlm_core #(
  parameter int unsigned Q = 32   // precision of the map in bits
) (
  input  logic [Q-1:0] gamma,     // control parameter (fraction)
  input  logic [Q-1:0] x,         // current state (fraction)
  output logic [Q-1:0] x_next     // VLM(gamma, x)
);

  logic [Q-1:0] gamma_c, x_c;     // after the zero detector
  logic [Q-1:0] p;                // floor_Q((alpha*gamma*x) mod 1)
  logic [Q-1:0] one_minus_x;      // 1 - x

  vlm_zero_detector #(.Q(Q)) u_zero (
    .gamma_in (gamma),
    .x_in     (x),
    .gamma_out(gamma_c),
    .x_out    (x_c)
  );

  vlm_trunc_mult #(.Q(Q)) u_mul1 (.a(gamma_c), .b(x_c), .p(p));

  always_comb one_minus_x = '0 - x_c;   // 2^Q - x, i.e. 1 - x in Q fraction bits

  vlm_trunc_mult #(.Q(Q)) u_mul2 (.a(p), .b(one_minus_x), .p(x_next));

endmodule
