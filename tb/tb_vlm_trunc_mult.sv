// tb_vlm_trunc_mult: checks floor_Q((2^ceil(Q/2) * a * b) mod 1) for Q = 32
// (bits 47..16 of the product) and for a Q = 16 instance (bits 23..8), on
// corner cases and random operands. The expected values are formed with
// 64-bit integer arithmetic: (a*b mod 2^(2Q-A)) / 2^(Q-A).
module tb_vlm_trunc_mult;
  logic [31:0] a32, b32, p32;
  logic [15:0] a16, b16, p16;
  int checks = 0, failures = 0;

  vlm_trunc_mult #(.Q(32)) dut32 (.a(a32), .b(b32), .p(p32));
  vlm_trunc_mult #(.Q(16)) dut16 (.a(a16), .b(b16), .p(p16));

  task automatic run(input longint unsigned a, input longint unsigned b);
    longint unsigned e32, e16;
    a32 = a[31:0]; b32 = b[31:0]; a16 = a[15:0]; b16 = b[15:0]; #1;
    e32 = ((a[31:0] * b[31:0]) % (64'd1 << 48)) >> 16;
    e16 = ((a[15:0] * b[15:0]) % (64'd1 << 24)) >> 8;
    checks += 2;
    if (p32 !== e32[31:0]) begin
      failures++; $display("FAIL q32 %h*%h -> %h exp %h", a32, b32, p32, e32[31:0]);
    end
    if (p16 !== e16[15:0]) begin
      failures++; $display("FAIL q16 %h*%h -> %h exp %h", a16, b16, p16, e16[15:0]);
    end
  endtask

  initial begin
    run(0, 0);
    run(64'hFFFF_FFFF, 64'hFFFF_FFFF);
    run(64'h0001_0000, 64'h0001_0000);   // 2^-16 * 2^-16 * 2^16 = 2^-16 -> 0x00010000
    run(64'h8000_0000, 64'h0000_0002);
    for (int i = 0; i < 3000; i++) run({$urandom, $urandom}, {$urandom, $urandom});
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
