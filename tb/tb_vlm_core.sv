// tb_vlm_core: checks one VLM step.
//  - Golden vectors computed beforehand with exact rational arithmetic
//    (32-bit and 16-bit maps), including gamma = 1 (masked to 0 and replaced)
//    and x = 0 (replaced), and the first eight states of the trajectory
//    gamma = 0.609375, x0 = 0.21875 iterated by feeding the output back.
//  - Random operands against vlm_ref_pkg::vlm_ref for both sizes.
module tb_vlm_core;
  import vlm_ref_pkg::*;
  logic [31:0] g32, x32, y32;
  logic [15:0] g16, x16, y16;
  int checks = 0, failures = 0;

  vlm_core #(.Q(32)) dut32 (.gamma(g32), .x(x32), .x_next(y32));
  vlm_core #(.Q(16)) dut16 (.gamma(g16), .x(x16), .x_next(y16));

  task automatic chk32(input logic [31:0] g, input logic [31:0] x, input logic [31:0] e);
    g32 = g; x32 = x; #1;
    checks++;
    if (y32 !== e) begin failures++; $display("FAIL q32 VLM(%h,%h)=%h exp %h", g, x, y32, e); end
  endtask
  task automatic chk16(input logic [15:0] g, input logic [15:0] x, input logic [15:0] e);
    g16 = g; x16 = x; #1;
    checks++;
    if (y16 !== e) begin failures++; $display("FAIL q16 VLM(%h,%h)=%h exp %h", g, x, y16, e); end
  endtask

  logic [31:0] traj [8] = '{32'h00000000, 32'h6ffffff6, 32'h9289ffc3, 32'h2b276724,
                            32'he45659ca, 32'h7d730c2f, 32'h44d0335d, 32'hb336dae1};

  initial begin
    logic [31:0] x;
    chk32(32'h9f767c45, 32'h4164d839, 32'ha28b3c9b);
    chk32(32'hbde5c099, 32'h5bc8fbbc, 32'h83840d6d);
    chk32(32'hcb91ce37, 32'hb0c11fde, 32'h604828ea);
    chk32(32'hf1446bea, 32'hd76d4330, 32'h5b59d35b);
    chk32(32'h00000001, 32'ha6eb8c9e, 32'he854d486);
    chk32(32'hec1d7da0, 32'h00000000, 32'hb074fff1);
    chk16(16'h076c, 16'hd721, 16'haf16);
    chk16(16'h7733, 16'hc6a5, 16'hc4b7);
    chk16(16'hf17f, 16'h3fc1, 16'hb640);
    chk16(16'ha623, 16'h0d46, 16'he772);
    chk16(16'h0001, 16'h2827, 16'h86e7);
    chk16(16'h1cfb, 16'h0000, 16'h72fe);
    x = 32'h3800_0000;                       // 0.21875
    for (int i = 0; i < 8; i++) begin
      chk32(32'h9C00_0000, x, traj[i]);      // gamma = 0.609375
      x = traj[i];
    end
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] g, xr;
      longint unsigned e;
      g = $urandom; xr = $urandom;
      e = vlm_ref(32, 64'(g), 64'(xr));
      chk32(g, xr, e[31:0]);
      e = vlm_ref(16, 64'(g[15:0]), 64'(xr[15:0]));
      chk16(g[15:0], xr[15:0], e[15:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
