// tb_mvlm_stats: statistical spot checks of the generators' output, as far
// as they can be run in simulation.
//  1. Bit balance of a scrambled 32-bit VLM with gamma = 0x10001000
//     scrambled every cycle: over 100,000 words (3.2 Mbit) the fraction of
//     ones must lie within 0.5 +/- 0.005.
//  2. The frequency (monobit) test of the NIST SP800-22 suite on one
//     1,000,000-bit sequence of the four-VLM generator (31,250 words):
//     |#ones - #zeros| / sqrt(n) must not exceed 2.5758, i.e. p >= 0.01.
//  3. Cross-correlation of the sequences for KEY = 0 and KEY = 1, which
//     differ in one key bit: the normalized correlation of 10,000 output
//     words (read as fractions in (0,1)) must be below 0.05 in magnitude for
//     lags -5..5.
// The word rate is checked too: the four-VLM generator must deliver one
// word on every cycle of its generation phase.
module tb_mvlm_stats;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------- scrambled VLM
  logic        s_load = 0, s_en = 0, s_valid;
  logic [31:0] s_xbar;
  scrambled_vlm u_svlm (.clk(clk), .rst_n(rst_n), .load(s_load), .gamma_in(32'h1000_1000),
                        .x0_in(32'h3800_0000), .n0_in(32'h0000_0001), .enable(s_en),
                        .xbar(s_xbar), .valid(s_valid));

  // ------------------------------------------------------------------ MVLM
  logic         m_start = 0;
  logic [127:0] m_key = '0;
  logic [31:0]  m_seq;
  logic         m_valid;
  logic [1:0]   m_phase;
  mvlm u_mvlm (.clk(clk), .rst_n(rst_n), .start(m_start), .key(m_key), .seq(m_seq),
               .seq_valid(m_valid), .phase(m_phase));

  real seqa [10000];
  real seqb [10000];

  task automatic collect(input logic [127:0] k, input int n, output longint ones,
                         ref real dst [10000]);
    int got, gaps;
    m_key = k; m_start = 1; @(negedge clk); m_start = 0;
    while (!m_valid) @(negedge clk);
    ones = 0; got = 0; gaps = 0;
    while (got < n) begin
      if (m_valid) begin
        ones += $countones(m_seq);
        if (got < 10000) dst[got] = real'(m_seq) / 4294967296.0;
        got++;
      end else gaps++;
      @(negedge clk);
    end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d cycles without a word", gaps); end
  endtask

  function automatic real xcorr(int lag);
    real ma = 0, mb = 0, sab = 0, saa = 0, sbb = 0;
    int n = 0;
    for (int i = 0; i < 10000; i++) begin ma += seqa[i]; mb += seqb[i]; end
    ma /= 10000.0; mb /= 10000.0;
    for (int i = 0; i < 10000; i++) begin
      saa += (seqa[i] - ma) ** 2;
      sbb += (seqb[i] - mb) ** 2;
      if (i + lag >= 0 && i + lag < 10000) begin
        sab += (seqa[i] - ma) * (seqb[i + lag] - mb);
        n++;
      end
    end
    return sab / $sqrt(saa * sbb);
  endfunction

  initial begin
    longint ones, total;
    real frac, stat, cmax;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. bit balance of the scrambled VLM
    s_load = 1; @(negedge clk); s_load = 0; s_en = 1;
    ones = 0;
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      ones += $countones(s_xbar);
    end
    s_en = 0;
    frac = real'(ones) / 3200000.0;
    $display("scrambled VLM, gamma=0x10001000: fraction of ones %f", frac);
    checks++;
    if (frac < 0.495 || frac > 0.505) begin failures++; $display("FAIL bit balance"); end

    // 2. monobit test on 10^6 bits of the four-VLM generator
    collect(128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210, 31250, ones, seqa);
    total = 31250 * 32;
    stat = $sqrt(real'(total));
    stat = ((2.0 * real'(ones)) - real'(total)) / stat;
    if (stat < 0) stat = -stat;
    $display("MVLM monobit: ones=%0d of %0d, |S|/sqrt(n)=%f (limit 2.5758)", ones, total, stat);
    checks++;
    if (stat > 2.5758) begin failures++; $display("FAIL monobit test"); end

    // 3. cross-correlation KEY = 0 vs KEY = 1
    collect(128'd0, 10000, ones, seqa);
    collect(128'd1, 10000, ones, seqb);
    cmax = 0;
    for (int lag = -5; lag <= 5; lag++) begin
      real c;
      c = xcorr(lag);
      if (c < 0) c = -c;
      if (c > cmax) cmax = c;
    end
    $display("KEY=0 vs KEY=1: max |cross-correlation| over lags -5..5 = %f", cmax);
    checks++;
    if (cmax > 0.05) begin failures++; $display("FAIL cross-correlation"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
