// tb_scrambled_vlm: runs the scrambled 32-bit VLM and compares every output
// word with a software model of xbar(i+1) = VLM(gamma, xbar(i)) xor n(i),
// n(i+1) = L_x(n(i)). Uses gamma = 0x05079f23 (a gamma used in the
// generator's statistical experiments). Checks one word per enabled cycle,
// that a paused cycle (enable low) holds the state, and that valid rises on
// the first step after a load. Counts and requires the zero-detector case
// (a start from x0 = 0).
module tb_scrambled_vlm;
  import vlm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        load, enable, valid;
  logic [31:0] gamma_in, x0_in, n0_in, xbar;
  int checks = 0, failures = 0, words = 0, pauses = 0;

  scrambled_vlm dut (.clk(clk), .rst_n(rst_n), .load(load), .gamma_in(gamma_in),
                     .x0_in(x0_in), .n0_in(n0_in), .enable(enable), .xbar(xbar),
                     .valid(valid));

  task automatic run(input logic [31:0] g, input logic [31:0] x0, input logic [31:0] n0,
                     input int steps);
    logic [31:0] x, n;
    load = 1; gamma_in = g; x0_in = x0; n0_in = n0; enable = 0;
    @(negedge clk);
    load = 0;
    checks++;
    if (xbar !== x0 || valid !== 1'b0) begin failures++; $display("FAIL load"); end
    x = x0; n = n0;
    for (int i = 0; i < steps; i++) begin
      enable = ($urandom_range(0, 7) != 0);
      if (enable) begin
        x = 32'(vlm_ref(32, 64'(g), 64'(x))) ^ n;
        n = 32'(lfsr_ref(32, 128'(n), 128'(mvlm_pkg::LX32_TAPS)));
        words++;
      end else pauses++;
      @(negedge clk);
      checks++;
      if (xbar !== x) begin failures++; $display("FAIL step %0d %h exp %h", i, xbar, x); end
      if (words > 0) begin
        checks++;
        if (valid !== 1'b1) begin failures++; $display("FAIL valid low"); end
      end
    end
    enable = 0;
  endtask

  initial begin
    load = 0; enable = 0; gamma_in = 0; x0_in = 0; n0_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(32'h0507_9f23, 32'h3800_0000, 32'h1234_5678, 400);
    run(32'h9C00_0000, 32'h0000_0000, 32'h0000_0001, 100);   // x0 = 0: zero detector
    checks++;
    if (pauses == 0) begin failures++; $display("FAIL no pause exercised"); end
    $display("words=%0d pauses=%0d", words, pauses);
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
