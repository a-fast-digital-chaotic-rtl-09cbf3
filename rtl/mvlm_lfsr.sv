// mvlm_lfsr: the scrambling LFSR L_x of the VLM generators.
//
// A W-bit Fibonacci shift register that shifts left by one bit per cycle:
// bit W-1 (the first bit, n[1] in MSB-first numbering) leaves, every other
// bit moves up one place and bit 0 receives the new bit. In normal operation
// the new bit is the XOR of the state bits selected by TAPS (bit e-1 of TAPS
// for each term x^e of the feedback polynomial), which gives a maximal-length
// sequence of 2^W - 1 states when the polynomial is primitive. The whole
// register is the noise word n that scrambles the VLM outputs.
//
// Controls, in priority order, all sampled on the rising clock edge:
//   load      - the register takes load_value (the key, for instance)
//   shift_ext - the register shifts left and takes ext_bit as its new LSB
//               instead of the feedback; the four-VLM generator uses this to
//               collect n_reg during the second key-initialization step
//   advance   - one normal LFSR step
// With none of them set the register holds. rst_n is an asynchronous,
// active-low reset to RESET_VALUE (non-zero, so the register cannot start in
// the all-zero lock-up state).
module mvlm_lfsr #(
  parameter int unsigned W           = 32,
  parameter logic [W-1:0] TAPS       = mvlm_pkg::LX32_TAPS,
  parameter logic [W-1:0] RESET_VALUE = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_value,
  input  logic         shift_ext,
  input  logic         ext_bit,
  input  logic         advance,
  output logic [W-1:0] state        // current noise word n
);

  logic         feedback;
  logic [W-1:0] state_next;   // L_x(n)

  always_comb begin
    feedback   = ^(state & TAPS);
    state_next = {state[W-2:0], feedback};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= RESET_VALUE;
    else if (load)      state <= load_value;
    else if (shift_ext) state <= {state[W-2:0], ext_bit};
    else if (advance)   state <= state_next;
  end

endmodule
