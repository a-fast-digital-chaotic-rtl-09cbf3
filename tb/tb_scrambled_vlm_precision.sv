// tb_scrambled_vlm_precision: the scrambled VLM at 16-, 20- and 24-bit
// precision (the lower precisions at which the generator's statistics were
// compared) next to the default 32 bits, plus the unscrambled map.
// Each instance gets a primitive LFSR polynomial of its own width:
// x^16+x^15+x^13+x^4+1, x^20+x^17+1, x^24+x^23+x^22+x^17+1 and the default
// x^32+x^31+x^30+x^29+x^28+x^22+1. Every word of 500 steps is compared with
// xbar(i+1) = VLM(gamma, xbar(i)) xor n(i). A fifth instance, loaded with an
// all-zero LFSR seed (which an LFSR keeps forever), must iterate the plain
// map x(i+1) = VLM(gamma, x(i)): it is checked against the first eight
// states of the trajectory gamma = 0.609375, x0 = 0.21875, computed
// beforehand with exact rational arithmetic.
module tb_scrambled_vlm_precision;
  import vlm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0, enable = 0;
  logic [15:0] x16;  logic [19:0] x20;  logic [23:0] x24;  logic [31:0] x32, xp;
  logic v16, v20, v24, v32, vp;
  int checks = 0, failures = 0;

  localparam logic [15:0] G16 = 16'h9f24, X16 = 16'h4164, N16 = 16'hACE1;
  localparam logic [19:0] G20 = 20'h9f76c, X20 = 20'h4164d, N20 = 20'h12345;
  localparam logic [23:0] G24 = 24'h9f767c, X24 = 24'h4164d8, N24 = 24'hABCDEF;
  localparam logic [31:0] G32 = 32'h0507_9f23, X32 = 32'h3800_0000, N32 = 32'h1234_5678;

  scrambled_vlm #(.Q(16), .LX_TAPS(16'hD008)) u16 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(G16), .x0_in(X16), .n0_in(N16), .enable(enable), .xbar(x16), .valid(v16));
  scrambled_vlm #(.Q(20), .LX_TAPS(20'h90000)) u20 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(G20), .x0_in(X20), .n0_in(N20), .enable(enable), .xbar(x20), .valid(v20));
  scrambled_vlm #(.Q(24), .LX_TAPS(24'hE10000)) u24 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(G24), .x0_in(X24), .n0_in(N24), .enable(enable), .xbar(x24), .valid(v24));
  scrambled_vlm u32 (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(G32), .x0_in(X32), .n0_in(N32), .enable(enable), .xbar(x32), .valid(v32));
  scrambled_vlm uplain (.clk(clk), .rst_n(rst_n), .load(load),
    .gamma_in(32'h9C00_0000), .x0_in(32'h3800_0000), .n0_in(32'h0), .enable(enable),
    .xbar(xp), .valid(vp));

  logic [31:0] traj [8] = '{32'h00000000, 32'h6ffffff6, 32'h9289ffc3, 32'h2b276724,
                            32'he45659ca, 32'h7d730c2f, 32'h44d0335d, 32'hb336dae1};

  function automatic longint unsigned step(int q, longint unsigned g, longint unsigned x,
                                           longint unsigned n);
    return vlm_ref(q, g, x) ^ n;
  endfunction

  function automatic longint unsigned lstep(int q, longint unsigned n, longint unsigned taps);
    logic [127:0] r;
    r = lfsr_ref(q, 128'(n), 128'(taps));
    return longint'(r[63:0]);
  endfunction

  task automatic cmp(input string name, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", name, got, exp); end
  endtask

  initial begin
    longint unsigned m16, m20, m24, m32, n16, n20, n24, n32;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0; enable = 1;
    m16 = X16; m20 = X20; m24 = X24; m32 = X32;
    n16 = N16; n20 = N20; n24 = N24; n32 = N32;
    for (int i = 0; i < 500; i++) begin
      m16 = step(16, G16, m16, n16); n16 = lstep(16, n16, 64'hD008);
      m20 = step(20, G20, m20, n20); n20 = lstep(20, n20, 64'h90000);
      m24 = step(24, G24, m24, n24); n24 = lstep(24, n24, 64'hE10000);
      m32 = step(32, G32, m32, n32); n32 = lstep(32, n32, 64'(mvlm_pkg::LX32_TAPS));
      @(negedge clk);
      cmp("16-bit", 64'(x16), m16);
      cmp("20-bit", 64'(x20), m20);
      cmp("24-bit", 64'(x24), m24);
      cmp("32-bit", 64'(x32), m32);
      if (i < 8) cmp("plain map", 64'(xp), 64'(traj[i]));
    end
    checks++;
    if (!(v16 && v20 && v24 && v32 && vp)) begin failures++; $display("FAIL valid"); end
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
