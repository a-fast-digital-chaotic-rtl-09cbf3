// tb_mvlm_sizes: the generator in the configurations whose synthesis and
// statistics are reported for it: one, two, three and four coupled 32-bit
// VLMs (32-, 64-, 96- and 128-bit keys and LFSRs), plus the four-VLM
// generator with an 8-bit output function (the middle byte of the word).
// Each instance runs against its own model (mvlm_checker). LFSR polynomials:
// x^32+x^31+x^30+x^29+x^28+x^22+1 for one VLM, x^64+x^63+x^61+x^60+1 and
// x^96+x^94+x^49+x^47+1 (both primitive) for two and three.
module tb_mvlm_sizes;
  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NC = 5;
  int   c   [NC];
  int   f   [NC];
  int   w   [NC];
  int   z   [NC];
  logic d   [NC];
  int checks = 0, failures = 0;

  mvlm_checker #(.M(1), .TAPS(32'hF820_0000)) u_m1 (
    .clk(clk), .rst_n(rst_n), .go(go), .checks(c[0]), .failures(f[0]), .words(w[0]),
    .zero_hits(z[0]), .done(d[0]));
  mvlm_checker #(.M(2), .TAPS(64'hD800_0000_0000_0000)) u_m2 (
    .clk(clk), .rst_n(rst_n), .go(go), .checks(c[1]), .failures(f[1]), .words(w[1]),
    .zero_hits(z[1]), .done(d[1]));
  mvlm_checker #(.M(3), .TAPS(96'hA000_0000_0001_4000_0000_0000)) u_m3 (
    .clk(clk), .rst_n(rst_n), .go(go), .checks(c[2]), .failures(f[2]), .words(w[2]),
    .zero_hits(z[2]), .done(d[2]));
  mvlm_checker #(.M(4)) u_m4 (
    .clk(clk), .rst_n(rst_n), .go(go), .checks(c[3]), .failures(f[3]), .words(w[3]),
    .zero_hits(z[3]), .done(d[3]));
  mvlm_checker #(.M(4), .OUT_W(8)) u_m4_byte (
    .clk(clk), .rst_n(rst_n), .go(go), .checks(c[4]), .failures(f[4]), .words(w[4]),
    .zero_hits(z[4]), .done(d[4]));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    go = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    for (int i = 0; i < NC; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      $display("instance %0d: checks=%0d failures=%0d words=%0d zero_detector=%0d", i, c[i], f[i], w[i], z[i]);
      if (w[i] == 0) begin failures++; $display("FAIL instance %0d produced no words", i); end
      if (z[i] == 0) begin failures++; $display("FAIL instance %0d never used the zero detector", i); end
    end
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
