// vlm_ref_pkg: reference models for the testbenches, written directly from
// the arithmetic definitions rather than from the RTL structure.
//
// vlm_ref(q, gamma, x) evaluates
//   VLM(gamma, x) = floor_q(alpha * floor_q((alpha*gamma*x) mod 1) * (1-x) mod 1)
// for q <= 32, alpha = 2^ceil(q/2), with the zero-detector rules (gamma's two
// LSBs cleared, a zero gamma or x replaced by 2^-(q-2)). Fractions are held
// as integers scaled by 2^q; "mod 1" of a value scaled by 2^(2q) is a modulo
// by 2^(2q), and floor_q is a division by 2^q.
package vlm_ref_pkg;

  function automatic longint unsigned vlm_ref(int q, longint unsigned gamma,
                                              longint unsigned x);
    longint unsigned a, one, g, xx, p, r, modulus;
    a       = 64'd1 << ((q + 1) / 2);
    one     = 64'd1 << q;
    modulus = one * one;                       // 2^(2q); wraps to 0 for q = 32
    g  = gamma & ~64'd3;
    if (g == 0) g = 4;
    xx = x;
    if (xx == 0) xx = 4;
    // alpha*g*x scaled by 2^(2q), reduced mod 2^(2q) (automatic for q = 32)
    p = a * g * xx;
    if (q < 32) p = p % modulus;
    p = p / one;                               // floor_q
    r = a * p * (one - xx);
    if (q < 32) r = r % modulus;
    r = r / one;
    return r;
  endfunction

  // One left-shift Fibonacci step of a w-bit LFSR with the given tap mask.
  function automatic logic [127:0] lfsr_ref(int w, logic [127:0] s, logic [127:0] taps);
    logic fb;
    logic [127:0] mask;
    mask = (w == 128) ? '1 : ((128'd1 << w) - 1);
    fb = 1'b0;
    for (int b = 0; b < w; b++) if (taps[b]) fb ^= s[b];
    return ((s << 1) | 128'(fb)) & mask;
  endfunction

endpackage
