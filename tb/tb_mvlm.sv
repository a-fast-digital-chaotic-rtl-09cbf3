// tb_mvlm: end-to-end test of the four-VLM generator at its default size
// (Q = 32, M = 4, 128-bit key, 32-bit output words).
//
// A cycle-by-cycle software model of the generator (key loading, step 1 with
// scrambling and gamma feedback, step 2 collecting n_reg, generation) is run
// beside the design, using vlm_ref_pkg's arithmetic definitions of the map
// and the LFSR. Every cycle the design's phase, seq_valid and, while valid,
// seq are compared with the model. The test also checks
//  - that seq_valid rises exactly 257 clock edges after the start edge
//    (1 load + 128 step-1 + 128 step-2 cycles) and then delivers one word per
//    cycle;
//  - that KEY = 0 and KEY = 1, which differ in one bit, give different
//    sequences.
// Mechanisms that must each happen at least once: key load, step-1 gamma
// feedback, step-2 n_reg shift-in, scrambled generation, the zero detector
// (KEY = 0 starts every VLM from x = 0), and a restart with a new key while
// generating.
module tb_mvlm;
  import vlm_ref_pkg::*;
  import mvlm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start;
  logic [127:0] key;
  logic [31:0]  seq;
  logic         seq_valid;
  logic [1:0]   phase;

  mvlm dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key), .seq(seq),
            .seq_valid(seq_valid), .phase(phase));

  int checks = 0, failures = 0;
  int n_load = 0, n_gamma_fb = 0, n_nreg_shift = 0, n_words = 0, n_zero = 0, n_restart = 0;

  // model state
  logic [31:0]  mg [4];
  logic [31:0]  mx [4];
  logic [127:0] mn;
  int           mph;     // 0 idle, 1 step 1, 2 step 2, 3 run
  int           mcnt;

  function automatic logic [31:0] kbits(logic [127:0] k, int first, int last);
    // KEY[first:last] in 1-based, MSB-first numbering
    logic [31:0] v = '0;
    for (int b = first; b <= last; b++) v = {v[30:0], k[128 - b]};
    return v;
  endfunction

  task automatic model_load(input logic [127:0] k);
    for (int i = 1; i <= 4; i++) begin
      mg[i-1] = (32'h1 << (32 - i)) | kbits(k, 16*i - 15, 16*i);
      mx[i-1] = {kbits(k, 16*i + 49, 16*i + 64)[15:0], 16'h0000};
    end
    mn = k; mph = 1; mcnt = 0;
    n_load++;
  endtask

  function automatic logic [31:0] model_xbar(int i);
    logic [31:0] v;
    v = 32'(vlm_ref(32, 64'(mg[i]), 64'(mx[i])));
    if (mph != 2) v ^= mn[127 - 32*i -: 32];
    return v;
  endfunction

  task automatic model_step();
    logic [31:0] vo [4];
    logic [31:0] xb [4];
    if (mph == 0) return;
    for (int i = 0; i < 4; i++) begin
      if (mx[i] == 0 || (mg[i] & ~32'd3) == 0) n_zero++;
      vo[i] = 32'(vlm_ref(32, 64'(mg[i]), 64'(mx[i])));
      xb[i] = model_xbar(i);
    end
    for (int i = 0; i < 4; i++) mx[(i + 1) % 4] = xb[i];
    if (mph == 1) begin
      for (int i = 0; i < 4; i++) mg[i] = {vo[i][0], mg[i][31:1]};
      n_gamma_fb++;
    end
    if (mph == 2) begin
      mn = {mn[126:0], vo[3][31]};
      n_nreg_shift++;
    end else mn = lfsr_ref(128, mn, LX128_TAPS);
    if (mph == 3) n_words++;
    if (mph == 1 || mph == 2) begin
      mcnt++;
      if (mcnt == 128) begin mcnt = 0; mph++; end
    end
  endtask

  // One clock cycle: compare outputs before the edge, then advance the model.
  task automatic cycle(input logic st, input logic [127:0] k, output logic [31:0] word);
    start = st; key = k;
    #1;
    checks++;
    if (int'(phase) != mph || seq_valid !== (mph == 3)) begin
      failures++;
      $display("FAIL phase %0d/%0b expected %0d", phase, seq_valid, mph);
    end
    word = 'x;
    if (mph == 3) begin
      word = model_xbar(3);
      checks++;
      if (seq !== word) begin failures++; $display("FAIL seq %h expected %h", seq, word); end
    end
    if (st) model_load(k); else model_step();
    @(posedge clk);
    @(negedge clk);
  endtask

  // Load a key and measure the edges until seq_valid; collect n words.
  task automatic run_key(input logic [127:0] k, input int nwords, output logic [31:0] w [16]);
    int edges;
    logic [31:0] word;
    cycle(1'b1, k, word);
    edges = 1;
    while (!seq_valid && edges < 1000) begin
      cycle(1'b0, k, word);
      edges++;
    end
    checks++;
    if (edges != 257) begin failures++; $display("FAIL latency %0d edges, expected 257", edges); end
    for (int j = 0; j < nwords; j++) begin
      cycle(1'b0, k, word);
      if (j < 16) w[j] = word;
    end
  endtask

  initial begin
    logic [31:0] w0 [16];
    logic [31:0] w1 [16];
    logic [31:0] w2 [16];
    logic [31:0] word;
    int diff;
    start = 0; key = '0; mph = 0; mcnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3; i++) cycle(1'b0, '0, word);    // idle
    run_key(128'd0, 300, w0);
    run_key(128'd1, 300, w1);
    n_restart++;                                          // start while generating
    run_key({$urandom, $urandom, $urandom, $urandom}, 300, w2);
    n_restart++;
    diff = 0;
    for (int j = 0; j < 16; j++) if (w0[j] != w1[j]) diff++;
    checks++;
    if (diff < 12) begin failures++; $display("FAIL KEY=0 and KEY=1 too similar (%0d)", diff); end
    $display("mechanisms: loads=%0d gamma_feedback=%0d nreg_shifts=%0d words=%0d zero_detect=%0d restarts=%0d",
             n_load, n_gamma_fb, n_nreg_shift, n_words, n_zero, n_restart);
    checks += 6;
    if (n_load == 0)       begin failures++; $display("FAIL no key load"); end
    if (n_gamma_fb == 0)   begin failures++; $display("FAIL no gamma feedback"); end
    if (n_nreg_shift == 0) begin failures++; $display("FAIL no n_reg shift"); end
    if (n_words == 0)      begin failures++; $display("FAIL no output word"); end
    if (n_zero == 0)       begin failures++; $display("FAIL zero detector never used"); end
    if (n_restart == 0)    begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
