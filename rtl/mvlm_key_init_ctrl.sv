// mvlm_key_init_ctrl: phase sequencer of the Multi-VLM generator.
//
// Key initialization takes 2*STEP_CYCLES clock cycles (256 for four 32-bit
// VLMs): STEP_CYCLES = Q*M cycles of step 1, which spreads the influence of
// every key bit over the intermediate internal keys, then STEP_CYCLES cycles
// of step 2, which collects the new LFSR seed n_reg one bit per cycle. After
// that the generator runs and delivers one output word per cycle.
//
// Behaviour: a `start` pulse (accepted in any phase, so a new key can be
// loaded at any time) raises `load_key` for that same cycle, and the data
// path stores the key on that clock edge. The phase then steps
// IDLE -> INIT1 -> INIT2 -> RUN, spending exactly STEP_CYCLES cycles in each
// of INIT1 and INIT2, and stays in RUN until the next start. The split of the
// 256 cycles into two equal steps and their length follow the generator's
// description; the start/load handshake and the IDLE phase after reset are
// this design's choices.
module mvlm_key_init_ctrl
  import mvlm_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 128   // Q*M
) (
  input  logic   clk,
  input  logic   rst_n,      // asynchronous, active low
  input  logic   start,      // begin key initialization with the key on the bus
  output logic   load_key,   // data path loads KEY on this clock edge
  output phase_e phase,      // current phase
  output logic   ready       // high in RUN: output words are valid
);

  localparam int unsigned CW = $clog2(STEP_CYCLES);

  logic [CW-1:0] count;
  logic          last;

  always_comb begin
    load_key = start;
    last     = (count == CW'(STEP_CYCLES - 1));
    ready    = (phase == PH_RUN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      count <= '0;
    end else if (start) begin
      phase <= PH_INIT1;
      count <= '0;
    end else begin
      unique case (phase)
        PH_INIT1: begin
          count <= last ? '0 : count + 1'b1;
          if (last) phase <= PH_INIT2;
        end
        PH_INIT2: begin
          count <= last ? '0 : count + 1'b1;
          if (last) phase <= PH_RUN;
        end
        default: ;   // IDLE and RUN hold until the next start
      endcase
    end
  end

endmodule
