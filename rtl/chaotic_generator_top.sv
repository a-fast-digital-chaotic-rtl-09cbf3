// chaotic_generator_top: the two VLM-based generators side by side.
//
//  - mvlm_*: the Multi-VLM keystream generator (four coupled 32-bit VLMs,
//    128-bit key, 32 bits per cycle after a 256-cycle key initialization).
//  - svlm_*: a single scrambled 32-bit VLM (one map, one 32-bit LFSR), the
//    smaller generator, loaded directly with gamma, x0 and the LFSR seed
//    and producing one 32-bit word per enabled cycle.
// The two share only the clock and reset; their ports are those of mvlm and
// scrambled_vlm, described in those modules. Parameters are passed through
// with the same defaults.
module chaotic_generator_top #(
  parameter int unsigned    Q       = 32,
  parameter int unsigned    M       = 4,
  parameter int unsigned    OUT_W   = 32,
  parameter logic [Q*M-1:0] LX_TAPS = mvlm_pkg::LX128_TAPS[Q*M-1:0],
  parameter logic [Q-1:0]   SVLM_TAPS = mvlm_pkg::LX32_TAPS[Q-1:0]
) (
  input  logic             clk,
  input  logic             rst_n,
  // Multi-VLM generator
  input  logic             mvlm_start,
  input  logic [Q*M-1:0]   mvlm_key,
  output logic [OUT_W-1:0] mvlm_seq,
  output logic             mvlm_seq_valid,
  output logic [1:0]       mvlm_phase,
  // single scrambled VLM
  input  logic             svlm_load,
  input  logic [Q-1:0]     svlm_gamma,
  input  logic [Q-1:0]     svlm_x0,
  input  logic [Q-1:0]     svlm_n0,
  input  logic             svlm_enable,
  output logic [Q-1:0]     svlm_xbar,
  output logic             svlm_valid
);

  mvlm #(.Q(Q), .M(M), .OUT_W(OUT_W), .LX_TAPS(LX_TAPS)) u_mvlm (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (mvlm_start),
    .key      (mvlm_key),
    .seq      (mvlm_seq),
    .seq_valid(mvlm_seq_valid),
    .phase    (mvlm_phase)
  );

  scrambled_vlm #(.Q(Q), .LX_TAPS(SVLM_TAPS)) u_svlm (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (svlm_load),
    .gamma_in(svlm_gamma),
    .x0_in   (svlm_x0),
    .n0_in   (svlm_n0),
    .enable  (svlm_enable),
    .xbar    (svlm_xbar),
    .valid   (svlm_valid)
  );

endmodule
