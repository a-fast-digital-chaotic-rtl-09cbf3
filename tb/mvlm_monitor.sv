// mvlm_monitor: testbench helper that watches the ports of one Multi-VLM
// generator and checks them cycle by cycle against a model.
//
// The model follows the generator's definition: key layout, step 1
// (scrambled ring, gamma feedback from each VLM output's LSB), step 2
// (unscrambled ring, MSB of the last VLM shifted into the LFSR), scrambled
// generation and the output function T, using vlm_ref_pkg's arithmetic
// definitions. It samples start and key on each rising edge and compares
// phase, seq_valid and (while valid) seq after each falling edge. It also
// counts the mechanisms it saw and measures the start-to-valid latency of
// every key load (reported in last_latency, in clock edges).
module mvlm_monitor #(
  parameter int unsigned      Q     = 32,
  parameter int unsigned      M     = 4,
  parameter int unsigned      OUT_W = 32,
  parameter logic [Q*M-1:0]   TAPS  = mvlm_pkg::LX128_TAPS[Q*M-1:0]
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [Q*M-1:0]   key,
  input  logic [OUT_W-1:0] seq,
  input  logic             seq_valid,
  input  logic [1:0]       phase,
  output int               checks,
  output int               failures,
  output int               loads,
  output int               gamma_feedback,
  output int               nreg_shifts,
  output int               words,
  output int               zero_hits,
  output int               last_latency
);
  import vlm_ref_pkg::*;

  localparam int N  = Q * M;
  localparam int H  = Q / 2;
  localparam int HI = Q - 1 - (Q - OUT_W) / 2;

  logic [Q-1:0] mg [M];
  logic [Q-1:0] mx [M];
  logic [N-1:0] mn;
  int           mph = 0, mcnt = 0, since_load = 0;

  initial begin
    checks = 0; failures = 0; loads = 0; gamma_feedback = 0; nreg_shifts = 0;
    words = 0; zero_hits = 0; last_latency = 0;
  end

  function automatic logic [Q-1:0] vref(logic [Q-1:0] g, logic [Q-1:0] x);
    longint unsigned r;
    r = vlm_ref(Q, 64'(g), 64'(x));
    return r[Q-1:0];
  endfunction

  function automatic logic [Q-1:0] xbar_of(int i);
    logic [Q-1:0] v;
    v = vref(mg[i], mx[i]);
    if (mph != 2) v ^= mn[N-1-Q*i -: Q];
    return v;
  endfunction

  task automatic model_load(input logic [N-1:0] k);
    for (int i = 0; i < M; i++) begin
      mg[i] = (Q'(1) << (Q - 1 - i)) | Q'(k[N-1-H*i -: H]);
      mx[i] = Q'(k[N-1-H*M-H*i -: H]) << H;
    end
    mn = k; mph = 1; mcnt = 0;
    loads++;
  endtask

  task automatic model_step();
    logic [Q-1:0] vo [M];
    logic [Q-1:0] xb [M];
    logic [127:0] wide;
    if (mph == 0) return;
    for (int i = 0; i < M; i++) begin
      if (mx[i] == 0 || (mg[i] & ~Q'(3)) == 0) zero_hits++;
      vo[i] = vref(mg[i], mx[i]);
      xb[i] = xbar_of(i);
    end
    for (int i = 0; i < M; i++) mx[(i + 1) % M] = xb[i];
    if (mph == 1) begin
      for (int i = 0; i < M; i++) mg[i] = {vo[i][0], mg[i][Q-1:1]};
      gamma_feedback++;
    end
    if (mph == 2) begin
      mn = {mn[N-2:0], vo[M-1][Q-1]};
      nreg_shifts++;
    end else begin
      wide = lfsr_ref(N, 128'(mn), 128'(TAPS));
      mn = wide[N-1:0];
    end
    if (mph == 3) words++;
    if (mph == 1 || mph == 2) begin
      mcnt++;
      if (mcnt == N) begin mcnt = 0; mph++; end
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      mph = 0; mcnt = 0;
    end else if (start) begin
      model_load(key);
      since_load = 1;
    end else begin
      model_step();
      if (since_load > 0) since_load++;
    end
  end

  always @(negedge clk) begin
    logic [Q-1:0] w;
    if (rst_n) begin
      checks++;
      if (int'(phase) != mph || seq_valid !== (mph == 3)) begin
        failures++;
        $display("FAIL Q=%0d M=%0d phase %0d/%0b expected %0d", Q, M, phase, seq_valid, mph);
      end
      if (mph == 3) begin
        if (since_load > 0) begin
          last_latency = since_load;   // edges from the start edge to the first valid word
          since_load = 0;
        end
        w = xbar_of(M - 1);
        checks++;
        if (seq !== w[HI -: OUT_W]) begin
          failures++;
          $display("FAIL Q=%0d M=%0d seq %h expected %h", Q, M, seq, w[HI -: OUT_W]);
        end
      end
    end
  end
endmodule
