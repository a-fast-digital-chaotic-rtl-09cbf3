// tb_chaotic_generator_top: end-to-end test of the top level with every
// parameter at its default (four 32-bit VLMs, 128-bit key, 32-bit words;
// single scrambled 32-bit VLM).
//
// Multi-VLM side: keys 0, 1 and a random key are loaded one after another,
// each followed by 300 generated words; a fourth key is loaded in the middle
// of key initialization step 2 and a fifth while generating. mvlm_monitor
// checks phase, seq_valid and every word against the model. The first word
// must come exactly 257 edges after each start, and KEY = 0 and KEY = 1 must
// give different sequences.
// Scrambled-VLM side, running at the same time: two loads (one with x0 = 0)
// and steps with random pauses, every word checked against
// xbar(i+1) = VLM(gamma, xbar(i)) xor n(i).
// Each mechanism must happen at least once: key load, step-1 gamma
// feedback, step-2 n_reg collection, generation, zero detector, restart
// during initialization, restart during generation, scrambled-VLM load,
// step and pause.
module tb_chaotic_generator_top;
  import vlm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         mvlm_start = 0;
  logic [127:0] mvlm_key = '0;
  logic [31:0]  mvlm_seq;
  logic         mvlm_seq_valid;
  logic [1:0]   mvlm_phase;
  logic         svlm_load = 0, svlm_enable = 0, svlm_valid;
  logic [31:0]  svlm_gamma = '0, svlm_x0 = '0, svlm_n0 = '0, svlm_xbar;

  chaotic_generator_top dut (
    .clk(clk), .rst_n(rst_n),
    .mvlm_start(mvlm_start), .mvlm_key(mvlm_key), .mvlm_seq(mvlm_seq),
    .mvlm_seq_valid(mvlm_seq_valid), .mvlm_phase(mvlm_phase),
    .svlm_load(svlm_load), .svlm_gamma(svlm_gamma), .svlm_x0(svlm_x0),
    .svlm_n0(svlm_n0), .svlm_enable(svlm_enable), .svlm_xbar(svlm_xbar),
    .svlm_valid(svlm_valid));

  int mon_checks, mon_failures, loads, gfb, nsh, words, zero_hits, latency;
  mvlm_monitor mon (
    .clk(clk), .rst_n(rst_n), .start(mvlm_start), .key(mvlm_key), .seq(mvlm_seq),
    .seq_valid(mvlm_seq_valid), .phase(mvlm_phase), .checks(mon_checks),
    .failures(mon_failures), .loads(loads), .gamma_feedback(gfb), .nreg_shifts(nsh),
    .words(words), .zero_hits(zero_hits), .last_latency(latency));

  int checks = 0, failures = 0;
  int restart_init = 0, restart_run = 0;
  int s_loads = 0, s_steps = 0, s_pauses = 0, s_zero = 0;
  bit mvlm_done = 0, svlm_done = 0;

  // ------------------------------------------------------ Multi-VLM driver
  task automatic load_key(input logic [127:0] k);
    mvlm_key = k; mvlm_start = 1;
    @(negedge clk);
    mvlm_start = 0;
  endtask

  task automatic run_key(input logic [127:0] k, input int nwords, output logic [31:0] w [8]);
    load_key(k);
    while (!mvlm_seq_valid) @(negedge clk);
    #1;
    checks++;
    if (latency != 257) begin failures++; $display("FAIL latency %0d, expected 257", latency); end
    for (int j = 0; j < nwords; j++) begin
      if (j < 8) w[j] = mvlm_seq;
      @(negedge clk);
    end
  endtask

  initial begin : mvlm_side
    logic [31:0] w0 [8];
    logic [31:0] w1 [8];
    logic [31:0] w2 [8];
    int diff;
    wait (rst_n);
    @(negedge clk);
    run_key(128'd0, 300, w0);
    if (mvlm_phase == 2'd3) restart_run++;
    run_key(128'd1, 300, w1);
    if (mvlm_phase == 2'd3) restart_run++;
    run_key({$urandom, $urandom, $urandom, $urandom}, 300, w2);
    // restart in the middle of step 2
    load_key(128'hFFFF_0000_FFFF_0000_1234_5678_9ABC_DEF0);
    repeat (200) @(negedge clk);
    if (mvlm_phase == 2'd2) restart_init++;
    run_key(128'h0F0F_0F0F_0F0F_0F0F_F0F0_F0F0_F0F0_F0F0, 100, w2);
    diff = 0;
    for (int j = 0; j < 8; j++) if (w0[j] != w1[j]) diff++;
    checks++;
    if (diff < 6) begin failures++; $display("FAIL KEY=0 and KEY=1 give similar words (%0d of 8 differ)", diff); end
    mvlm_done = 1;
  end

  // -------------------------------------------------- scrambled VLM driver
  task automatic svlm_run(input logic [31:0] g, input logic [31:0] x0,
                          input logic [31:0] n0, input int steps);
    logic [31:0] x, n;
    svlm_load = 1; svlm_gamma = g; svlm_x0 = x0; svlm_n0 = n0; svlm_enable = 0;
    @(negedge clk);
    svlm_load = 0;
    s_loads++;
    if (x0 == 0) s_zero++;
    x = x0; n = n0;
    for (int i = 0; i < steps; i++) begin
      svlm_enable = ($urandom_range(0, 5) != 0);
      if (svlm_enable) begin
        if (x == 0) s_zero++;
        x = 32'(vlm_ref(32, 64'(g), 64'(x))) ^ n;
        n = 32'(lfsr_ref(32, 128'(n), 128'(mvlm_pkg::LX32_TAPS)));
        s_steps++;
      end else s_pauses++;
      @(negedge clk);
      checks++;
      if (svlm_xbar !== x || (s_steps > 0 && svlm_valid !== 1'b1)) begin
        failures++;
        $display("FAIL scrambled VLM step %0d: %h expected %h", i, svlm_xbar, x);
      end
    end
    svlm_enable = 0;
  endtask

  initial begin : svlm_side
    wait (rst_n);
    @(negedge clk);
    svlm_run(32'h0507_9f23, 32'h3800_0000, 32'h1234_5678, 600);
    svlm_run(32'h9C00_0000, 32'h0000_0000, 32'h0000_0001, 200);
    svlm_done = 1;
  end

  // ----------------------------------------------------------- reporting
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (mvlm_done && svlm_done);
    @(negedge clk);
    checks += mon_checks;
    failures += mon_failures;
    $display("multi-VLM: loads=%0d gamma_feedback=%0d nreg_shifts=%0d words=%0d zero_detector=%0d restart_init=%0d restart_run=%0d",
             loads, gfb, nsh, words, zero_hits, restart_init, restart_run);
    $display("scrambled VLM: loads=%0d steps=%0d pauses=%0d zero_starts=%0d", s_loads, s_steps, s_pauses, s_zero);
    checks += 11;
    if (loads == 0)        begin failures++; $display("FAIL no key load"); end
    if (gfb == 0)          begin failures++; $display("FAIL no gamma feedback"); end
    if (nsh == 0)          begin failures++; $display("FAIL no n_reg collection"); end
    if (words == 0)        begin failures++; $display("FAIL no generated word"); end
    if (zero_hits == 0)    begin failures++; $display("FAIL zero detector never used"); end
    if (restart_init == 0) begin failures++; $display("FAIL no restart during initialization"); end
    if (restart_run == 0)  begin failures++; $display("FAIL no restart during generation"); end
    if (s_loads == 0)      begin failures++; $display("FAIL no scrambled-VLM load"); end
    if (s_steps == 0)      begin failures++; $display("FAIL no scrambled-VLM step"); end
    if (s_pauses == 0)     begin failures++; $display("FAIL no scrambled-VLM pause"); end
    if (s_zero == 0)       begin failures++; $display("FAIL scrambled VLM never started from zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
