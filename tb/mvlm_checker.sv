// mvlm_checker: testbench helper that drives one mvlm instance of any size
// and checks it with mvlm_monitor.
//
// After `go` rises it loads NKEYS keys in turn (key 0, then random keys),
// waits for seq_valid, checks that it came exactly 2*Q*M + 1 clock edges
// after the start edge, and lets NWORDS words go by per key. Results are
// reported on the output ports; `done` rises when finished.
module mvlm_checker #(
  parameter int unsigned      Q      = 32,
  parameter int unsigned      M      = 4,
  parameter int unsigned      OUT_W  = 32,
  parameter logic [Q*M-1:0]   TAPS   = mvlm_pkg::LX128_TAPS[Q*M-1:0],
  parameter int               NKEYS  = 3,
  parameter int               NWORDS = 200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output int   checks,
  output int   failures,
  output int   words,
  output int   zero_hits,
  output logic done
);
  localparam int N = Q * M;

  logic             start = 0;
  logic [N-1:0]     key = '0;
  logic [OUT_W-1:0] seq;
  logic             seq_valid;
  logic [1:0]       phase;
  int               mon_checks, mon_failures, loads, gfb, nsh, latency;
  int               own_checks = 0, own_failures = 0;

  mvlm #(.Q(Q), .M(M), .OUT_W(OUT_W), .LX_TAPS(TAPS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .seq(seq),
    .seq_valid(seq_valid), .phase(phase));

  mvlm_monitor #(.Q(Q), .M(M), .OUT_W(OUT_W), .TAPS(TAPS)) mon (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .seq(seq),
    .seq_valid(seq_valid), .phase(phase), .checks(mon_checks), .failures(mon_failures),
    .loads(loads), .gamma_feedback(gfb), .nreg_shifts(nsh), .words(words),
    .zero_hits(zero_hits), .last_latency(latency));

  always_comb begin
    checks   = mon_checks + own_checks;
    failures = mon_failures + own_failures;
  end

  initial begin
    logic [N-1:0] k;
    done = 0;
    wait (go);
    @(negedge clk);
    for (int r = 0; r < NKEYS; r++) begin
      k = '0;
      if (r > 0) for (int b = 0; b < N; b += 32) k = (k << 32) | N'($urandom);
      key = k; start = 1;
      @(negedge clk);
      start = 0;
      while (!seq_valid) @(negedge clk);
      #1;   // let the monitor record the latency of this edge first
      own_checks++;
      if (latency != 2 * N + 1) begin
        own_failures++;
        $display("FAIL Q=%0d M=%0d latency %0d expected %0d", Q, M, latency, 2 * N + 1);
      end
      repeat (NWORDS) @(negedge clk);
    end
    done = 1;
  end
endmodule
