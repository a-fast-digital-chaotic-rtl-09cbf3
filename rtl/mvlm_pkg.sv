// mvlm_pkg: types and constants shared by the Multi-VLM chaotic generator.
//
// - phase_e: the four phases of the generator, as sequenced by
//   mvlm_key_init_ctrl (load the key, key-initialization step 1, step 2,
//   sequence generation).
// - LX32_TAPS: feedback taps of the 32-bit scrambling LFSR used with a single
//   VLM, x^32 + x^31 + x^30 + x^29 + x^28 + x^22 + 1 (the polynomial the
//   generator's authors use for their 32-bit experiments). Bit e-1 of the mask
//   is set for each term x^e.
// - LX128_TAPS: feedback taps of the 128-bit global LFSR of a four-VLM
//   generator. No polynomial is given for this width; this design uses the
//   pentanomial x^128 + x^126 + x^101 + x^99 + 1, a
//   well-known maximal-length choice.
package mvlm_pkg;

  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,   // waiting for start; no key loaded yet
    PH_INIT1 = 2'd1,   // step 1: scrambled ring, gamma feedback, LFSR running
    PH_INIT2 = 2'd2,   // step 2: unscrambled ring, last VLM's MSB shifted into n_reg
    PH_RUN   = 2'd3    // generation: scrambled ring, LFSR running, Seq valid
  } phase_e;

  localparam logic [31:0]  LX32_TAPS  = 32'hF820_0000;   // bits 31,30,29,28,27,21
  localparam logic [127:0] LX128_TAPS = (128'd1 << 127) | (128'd1 << 125)
                                      | (128'd1 << 100) | (128'd1 << 98);

endpackage
