// mvlm: Multi-VLM (MVLM) chaotic sequence generator with key initialization.
//
// M Variational Logistic Maps of Q bits each (four 32-bit maps by default)
// form a ring. VLM i reads its state from its own input register, and its
// output x_i is XORed with slice i of a global (Q*M)-bit LFSR word n (slice 0
// is the most significant Q bits). The scrambled result xbar_i is written to
// the input register of VLM i+1, and xbar of the last VLM closes the ring into
// VLM 0. All registers advance together once per clock, so the ring is a
// four-stage loop and every clock cycle yields one output word. The output
// function T selects the middle OUT_W bits of the last VLM's scrambled
// output; with OUT_W = Q the whole word is delivered (32 bits per cycle).
// The LFSR guarantees a cycle length of at least 2^(Q*M) - 1.
//
// Key initialization (2*Q*M cycles) turns the (Q*M)-bit KEY into the
// internal keys: gamma_i, the initial states and the LFSR seed.
//   load   gamma_i = bit (Q-1-i) set, low Q/2 bits = key half-word i
//          (counting from the key's MSB); x_i = key half-word M+i in the
//          upper half, zeros below; n = KEY. (For four 32-bit VLMs:
//          gamma_1 = {0x8000, KEY[1:16]}, x_1 = {KEY[65:80], 0x0000}, ...)
//   step 1 (Q*M cycles) the ring runs scrambled with the LFSR stepping, and
//          each gamma_i shifts right one place taking the LSB of x_i as its
//          new MSB.
//   step 2 (Q*M cycles) the ring runs without scrambling, gammas are
//          frozen, and the MSB of the last VLM's output is shifted into the
//          LFSR register from the right each cycle; after Q*M cycles that
//          register holds n_reg, the first collected bit in its MSB.
//   run    the ring runs scrambled, the LFSR steps, seq is valid.
//
// Interface: pulse `start` for one cycle with `key` valid; the key is taken
// on that edge. `seq_valid` rises 2*Q*M + 1 clock edges later (257 for the
// defaults) and stays high, with a new `seq` word every cycle, until the next
// start. `seq` is combinational from the ring registers (two multiplier
// delays). rst_n is asynchronous and active low.
//
// What follows the generator's description: the ring of VLMs with the
// registers at each VLM input, the slice order of n, the key loading, both
// key-initialization steps and their lengths, and the output function. This
// design's own choices: the 128-bit LFSR polynomial (see mvlm_pkg), reusing
// the LFSR register itself as n_reg, the start/ready handshake, reset values,
// and the output function's default width.
module mvlm
  import mvlm_pkg::*;
#(
  parameter int unsigned      Q       = 32,                // VLM precision (bits)
  parameter int unsigned      M       = 4,                 // number of VLMs
  parameter int unsigned      OUT_W   = 32,                // bits delivered per cycle by T
  parameter logic [Q*M-1:0]   LX_TAPS = LX128_TAPS[Q*M-1:0] // L_x feedback taps
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,      // load key and start key initialization
  input  logic [Q*M-1:0]   key,        // KEY, KEY[1] (first bit) is key[Q*M-1]
  output logic [OUT_W-1:0] seq,        // Seq_j = T(xbar_M)
  output logic             seq_valid,  // generation phase: seq is a new word each cycle
  output logic [1:0]       phase       // 0 idle, 1 key-init step 1, 2 step 2, 3 run
);

  localparam int unsigned N  = Q * M;        // LFSR width
  localparam int unsigned H  = Q / 2;        // key half-word width
  localparam int unsigned HI = Q - 1 - (Q - OUT_W) / 2;   // MSB taken by T

  if (Q % 2 != 0 || M > H || OUT_W > Q || M < 1) begin : g_bad_params
    $error("mvlm: needs even Q, 1 <= M <= Q/2 and OUT_W <= Q");
  end

  // ---------------------------------------------------------------- control
  logic   load_key;
  logic   ready;
  phase_e ph;

  mvlm_key_init_ctrl #(.STEP_CYCLES(N)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .load_key(load_key),
    .phase   (ph),
    .ready   (ready)
  );

  logic ring_en;      // ring registers advance
  logic scramble;     // xbar = x xor n (steps 1 and run) or xbar = x (step 2)
  logic gamma_shift;  // step 1 gamma feedback

  always_comb begin
    ring_en     = (ph != PH_IDLE) && !load_key;
    scramble    = (ph != PH_INIT2);
    gamma_shift = (ph == PH_INIT1) && !load_key;
  end

  // -------------------------------------------------------------- noise L_x
  logic [N-1:0] noise;
  logic [Q-1:0] vout [M];     // x_i = VLM(gamma_i, input_i)

  mvlm_lfsr #(.W(N), .TAPS(LX_TAPS), .RESET_VALUE(N'(1))) u_lx (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load_key),
    .load_value(key),
    .shift_ext (ring_en && ph == PH_INIT2),
    .ext_bit   (vout[M-1][Q-1]),
    .advance   (ring_en && ph != PH_INIT2),
    .state     (noise)
  );

  // ----------------------------------------------------------- VLM ring
  logic [Q-1:0] gamma_r [M];  // gamma_i registers
  logic [Q-1:0] x_r     [M];  // input register of VLM i
  logic [Q-1:0] xbar    [M];  // scrambled (or, in step 2, plain) outputs

  for (genvar i = 0; i < M; i++) begin : g_vlm
    vlm_core #(.Q(Q)) u_vlm (.gamma(gamma_r[i]), .x(x_r[i]), .x_next(vout[i]));

    always_comb
      xbar[i] = scramble ? (vout[i] ^ noise[N-1-Q*i -: Q]) : vout[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        gamma_r[i] <= '0;
        x_r[i]     <= '0;
      end else if (load_key) begin
        gamma_r[i] <= (Q'(1) << (Q - 1 - i)) | Q'(key[N-1-H*i -: H]);
        x_r[i]     <= {key[N-1-H*M-H*i -: H], {(Q-H){1'b0}}};
      end else if (ring_en) begin
        x_r[i] <= xbar[(i + M - 1) % M];
        if (gamma_shift)
          gamma_r[i] <= {vout[i][0], gamma_r[i][Q-1:1]};
      end
    end
  end

  // ------------------------------------------------------ output function T
  always_comb begin
    seq       = xbar[M-1][HI -: OUT_W];
    seq_valid = ready;
    phase     = ph;
  end

endmodule
