// vlm_zero_detector: input conditioning of one VLM (Variational Logistic Map).
//
// The map works on Q-bit fractions in (0,1); bit Q-1 has weight 1/2 and bit 0
// weight 2^-Q. Two rules are applied before the multipliers:
//   1. gamma's two least significant bits are forced to 0, so that
//      alpha^2 * gamma (alpha = 2^(Q/2)) is a whole multiple of four, the
//      condition under which the raw map is chaotic.
//   2. A value that is zero is replaced by 2^-(Q-2) (only bit 2 set), the
//      smallest gamma that rule 1 allows. Without this the map would emit an
//      endless run of zeros (x = 0 is a fixed point, and gamma = 0 maps
//      everything to 0).
// Rule 1 and rule 2 for gamma follow the generator's description of its zero
// detector. Applying rule 2 to x as well is this design's reading of the
// statement that one comparator checks both x and gamma for zero. Gamma is
// tested for zero after its two LSBs are cleared.
//
// Purely combinational; no clock.
module vlm_zero_detector #(
  parameter int unsigned Q = 32   // precision of the map in bits
) (
  input  logic [Q-1:0] gamma_in,  // raw control parameter
  input  logic [Q-1:0] x_in,      // raw state
  output logic [Q-1:0] gamma_out, // conditioned gamma: LSBs cleared, never zero
  output logic [Q-1:0] x_out      // conditioned x: never zero
);

  localparam logic [Q-1:0] MIN_VALUE = Q'(4);   // 2^-(Q-2)

  logic [Q-1:0] gamma_masked;

  always_comb begin
    gamma_masked = {gamma_in[Q-1:2], 2'b00};
    gamma_out    = (gamma_masked == '0) ? MIN_VALUE : gamma_masked;
    x_out        = (x_in == '0) ? MIN_VALUE : x_in;
  end

endmodule
