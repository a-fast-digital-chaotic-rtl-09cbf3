// tb_vlm_zero_detector: checks the zero detector on corner cases and random
// values: gamma's two LSBs always cleared, zero gamma (also a gamma whose
// only set bits are the two LSBs) and zero x replaced by 4 (2^-30), other
// values passed unchanged.
module tb_vlm_zero_detector;
  localparam int Q = 32;
  logic [Q-1:0] gi, xi, go, xo;
  int checks = 0, failures = 0;

  vlm_zero_detector #(.Q(Q)) dut (.gamma_in(gi), .x_in(xi), .gamma_out(go), .x_out(xo));

  task automatic check(input logic [Q-1:0] g, input logic [Q-1:0] x,
                       input logic [Q-1:0] eg, input logic [Q-1:0] ex);
    gi = g; xi = x; #1;
    checks++;
    if (go !== eg || xo !== ex) begin
      failures++;
      $display("FAIL g=%h x=%h -> %h %h, expected %h %h", g, x, go, xo, eg, ex);
    end
  endtask

  initial begin
    check(32'h0, 32'h0, 32'h4, 32'h4);
    check(32'h3, 32'h1, 32'h4, 32'h1);
    check(32'h1, 32'h8000_0000, 32'h4, 32'h8000_0000);
    check(32'h7, 32'hFFFF_FFFF, 32'h4, 32'hFFFF_FFFF);
    check(32'hFFFF_FFFF, 32'h0, 32'hFFFF_FFFC, 32'h4);
    check(32'h8000_0002, 32'h2, 32'h8000_0000, 32'h2);
    for (int i = 0; i < 2000; i++) begin
      logic [Q-1:0] g, x, eg, ex;
      g = $urandom; x = $urandom;
      if (i % 7 == 0) g = g & 32'h3;
      if (i % 11 == 0) x = 0;
      eg = (g / 4) * 4;
      if (eg == 0) eg = 4;
      ex = (x == 0) ? 4 : x;
      check(g, x, eg, ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
