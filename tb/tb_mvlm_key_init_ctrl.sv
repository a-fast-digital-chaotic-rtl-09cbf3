// tb_mvlm_key_init_ctrl: checks the phase sequence of the key-initialization
// controller at its default length (128 cycles per step): IDLE after reset,
// load_key exactly in the start cycle, exactly 128 cycles in INIT1 and in
// INIT2, then RUN with ready high until the next start; a start in the
// middle of INIT2 restarts step 1.
module tb_mvlm_key_init_ctrl;
  import mvlm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   start, load_key, ready;
  phase_e phase;
  int checks = 0, failures = 0;

  mvlm_key_init_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .load_key(load_key),
                          .phase(phase), .ready(ready));

  task automatic expect_phase(input phase_e p, input logic rdy, input string what);
    checks++;
    if (phase !== p || ready !== rdy || load_key !== start) begin
      failures++;
      $display("FAIL %s: phase %0d ready %0b load_key %0b", what, phase, ready, load_key);
    end
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_phase(PH_IDLE, 0, "after reset");
    repeat (5) @(negedge clk);
    expect_phase(PH_IDLE, 0, "idle holds");
    start = 1; #1; expect_phase(PH_IDLE, 0, "start cycle"); @(negedge clk); start = 0;
    for (int i = 0; i < 128; i++) begin expect_phase(PH_INIT1, 0, "step 1"); @(negedge clk); end
    for (int i = 0; i < 128; i++) begin expect_phase(PH_INIT2, 0, "step 2"); @(negedge clk); end
    for (int i = 0; i < 50; i++)  begin expect_phase(PH_RUN, 1, "run");     @(negedge clk); end
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 128; i++) begin expect_phase(PH_INIT1, 0, "step 1 again"); @(negedge clk); end
    repeat (60) @(negedge clk);
    expect_phase(PH_INIT2, 0, "mid step 2");
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 128; i++) begin expect_phase(PH_INIT1, 0, "restart"); @(negedge clk); end
    expect_phase(PH_INIT2, 0, "restart step 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
