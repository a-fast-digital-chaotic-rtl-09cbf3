// scrambled_vlm: a single VLM with output scrambling, the generator's basic
// building block.
//
// Every clock cycle the state register is replaced by
//     xbar(i+1) = VLM(gamma, xbar(i)) xor n(i),   n(i+1) = L_x(n(i))
// where L_x is a Q-bit LFSR. The XOR with a maximal-length LFSR word
// guarantees a cycle length of at least 2^Q - 1 and evens out the bit
// distribution. One Q-bit word is produced per cycle (32 bits per cycle at
// the default size).
//
// Interface: a one-cycle `load` pulse stores gamma_in, x0_in and n0_in into
// the gamma, state and LFSR registers; while `enable` is high the generator
// advances one step per cycle. `xbar` is the current (registered) state,
// i.e. the latest output word; `valid` is high from the first step after a
// load. The LFSR polynomial defaults to x^32+x^31+x^30+x^29+x^28+x^22+1, the
// one the generator's authors use at 32 bits. The load/enable handshake,
// the output register and the reset values are this design's choices.
module scrambled_vlm #(
  parameter int unsigned  Q      = 32,
  parameter logic [Q-1:0] LX_TAPS = mvlm_pkg::LX32_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,     // asynchronous, active low
  input  logic         load,      // store gamma_in, x0_in, n0_in
  input  logic [Q-1:0] gamma_in,
  input  logic [Q-1:0] x0_in,
  input  logic [Q-1:0] n0_in,
  input  logic         enable,    // advance one step this cycle
  output logic [Q-1:0] xbar,      // current scrambled state / output word
  output logic         valid      // xbar holds a generated word
);

  logic [Q-1:0] gamma_q;
  logic [Q-1:0] x_vlm;            // VLM(gamma, xbar)
  logic [Q-1:0] noise;            // n(i)

  vlm_core #(.Q(Q)) u_vlm (.gamma(gamma_q), .x(xbar), .x_next(x_vlm));

  mvlm_lfsr #(.W(Q), .TAPS(LX_TAPS)) u_lx (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .load_value(n0_in),
    .shift_ext (1'b0),
    .ext_bit   (1'b0),
    .advance   (enable && !load),
    .state     (noise)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gamma_q <= '0;
      xbar    <= '0;
      valid   <= 1'b0;
    end else if (load) begin
      gamma_q <= gamma_in;
      xbar    <= x0_in;
      valid   <= 1'b0;
    end else if (enable) begin
      xbar    <= x_vlm ^ noise;
      valid   <= 1'b1;
    end
  end

endmodule
