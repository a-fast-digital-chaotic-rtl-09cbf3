// tb_scrambled_vlm_cycle: checks the cycle-length guarantee of LFSR
// scrambling on small, exhaustively searchable generators.
//
// A q-bit scrambled VLM has the joint state (x, n) with 2^(2q) values, so
// its trajectory is eventually periodic. Because n runs through a
// maximal-length LFSR with period 2^q - 1 and is part of the state, the
// period of the trajectory must be a multiple of 2^q - 1, and therefore at
// least 2^q - 1. For q = 8 (LFSR x^8+x^6+x^5+x^4+1) and q = 10
// (x^10+x^7+1), each instance runs 2^(2q) steps to leave any transient,
// then the period of the (x, n) state is measured and must be a non-zero
// multiple of 2^q - 1. The output period of the unscrambled map (LFSR
// seed 0) is measured the same way and printed for comparison.
module tb_scrambled_vlm_cycle;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, enable = 0;
  logic [7:0] x8, xp8;
  logic [9:0] x10;
  logic v8, v10, vp8;
  int checks = 0, failures = 0;

  scrambled_vlm #(.Q(8), .LX_TAPS(8'hB8)) u8 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(8'h9C), .x0_in(8'h38), .n0_in(8'h01), .enable(enable), .xbar(x8), .valid(v8));
  scrambled_vlm #(.Q(10), .LX_TAPS(10'h240)) u10 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(10'h29C), .x0_in(10'h0E1), .n0_in(10'h001), .enable(enable), .xbar(x10), .valid(v10));
  scrambled_vlm #(.Q(8), .LX_TAPS(8'hB8)) up8 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(8'h9C), .x0_in(8'h38), .n0_in(8'h00), .enable(enable), .xbar(xp8), .valid(vp8));

  initial begin
    logic [15:0] ref8, refp8;
    logic [19:0] ref10;
    int p8, p10, pp8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0; enable = 1;
    repeat (1 << 20) @(negedge clk);              // past every transient
    ref8  = {x8, u8.noise};
    ref10 = {x10, u10.noise};
    refp8 = {xp8, up8.noise};
    p8 = 0; p10 = 0; pp8 = 0;
    for (int i = 1; i <= (1 << 20); i++) begin
      @(negedge clk);
      if (p8 == 0  && {x8, u8.noise} == ref8)      p8 = i;
      if (p10 == 0 && {x10, u10.noise} == ref10)   p10 = i;
      if (pp8 == 0 && {xp8, up8.noise} == refp8)   pp8 = i;
      if (p8 != 0 && p10 != 0 && pp8 != 0) break;
    end
    $display("period q=8 scrambled: %0d (2^8-1 = 255), q=10 scrambled: %0d (2^10-1 = 1023), q=8 unscrambled: %0d",
             p8, p10, pp8);
    checks += 3;
    if (p8 == 0 || p8 % 255 != 0)    begin failures++; $display("FAIL q=8 period"); end
    if (p10 == 0 || p10 % 1023 != 0) begin failures++; $display("FAIL q=10 period"); end
    if (pp8 == 0)                    begin failures++; $display("FAIL unscrambled period not found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 << 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
