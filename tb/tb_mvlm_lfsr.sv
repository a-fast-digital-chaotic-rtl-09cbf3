// tb_mvlm_lfsr: checks the scrambling LFSR.
//  - A 4-bit instance with x^4 + x^3 + 1 must visit all 15 non-zero states
//    and return to its seed after exactly 15 steps.
//  - The 32-bit instance (default polynomial) is compared with a bit-serial
//    reference step over 500 cycles, with load, hold, external shift-in and
//    the load > shift_ext > advance priority exercised.
module tb_mvlm_lfsr;
  import vlm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ld4, ld32, sh32, eb32, adv4, adv32;
  logic [3:0]  lv4, s4;
  logic [31:0] lv32, s32, model;
  int checks = 0, failures = 0;

  mvlm_lfsr #(.W(4), .TAPS(4'b1100)) dut4 (
    .clk(clk), .rst_n(rst_n), .load(ld4), .load_value(lv4), .shift_ext(1'b0),
    .ext_bit(1'b0), .advance(adv4), .state(s4));
  mvlm_lfsr #(.W(32)) dut32 (
    .clk(clk), .rst_n(rst_n), .load(ld32), .load_value(lv32), .shift_ext(sh32),
    .ext_bit(eb32), .advance(adv32), .state(s32));

  initial begin
    bit seen [16];
    int period;
    {ld4, ld32, sh32, eb32, adv4, adv32} = '0;
    lv4 = 4'h9; lv32 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (s4 !== 4'd1 || s32 !== 32'd1) begin failures++; $display("FAIL reset value"); end
    // 4-bit period
    ld4 = 1; @(negedge clk); ld4 = 0; adv4 = 1;
    period = 0;
    for (int i = 0; i < 16; i++) seen[i] = 0;
    do begin
      seen[s4] = 1;
      @(negedge clk); period++;
    end while (s4 != 4'h9 && period < 40);
    adv4 = 0;
    checks++;
    if (period != 15) begin failures++; $display("FAIL 4-bit period %0d", period); end
    for (int i = 1; i < 16; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL state %0d never visited", i); end
    end
    // 32-bit against the reference
    lv32 = 32'hDEAD_BEEF; ld32 = 1; @(negedge clk); ld32 = 0;
    model = 32'hDEAD_BEEF;
    for (int i = 0; i < 500; i++) begin
      int op;
      op = $urandom_range(0, 9);
      ld32 = (op == 0); sh32 = (op == 1 || op == 0); adv32 = (op != 2);
      eb32 = $urandom; lv32 = $urandom;
      if (ld32)       model = lv32;
      else if (sh32)  model = {model[30:0], eb32};
      else if (adv32) model = lfsr_ref(32, 128'(model), 128'(mvlm_pkg::LX32_TAPS));
      @(negedge clk);
      checks++;
      if (s32 !== model) begin failures++; $display("FAIL cycle %0d %h exp %h", i, s32, model); end
    end
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
