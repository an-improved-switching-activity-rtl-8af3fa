// bist_ctrl: reseeding test sequencer of the BIST engine.
//
// A start pulse clears the signature register and then runs NUM_SEEDS test
// segments. Each segment takes one LOAD cycle, in which the seed at seed_addr
// is written into the pattern generator, followed by PATTERNS_PER_SEED RUN
// cycles. In every RUN cycle one pattern is applied (pattern_valid), the
// signature register compacts the response on the closing clock edge
// (misr_en) and the generator advances (tpg_en). After the last segment the
// controller raises done for good until the next start; the signature is then
// stable.
//
// Ports: clk, rst_n (synchronous, active low), start, seed_addr, tpg_load,
// tpg_en, misr_clr, misr_en, pattern_valid, reseed (pulses with each LOAD),
// busy, done.
// Timing: a full test takes 1 + NUM_SEEDS * (1 + PATTERNS_PER_SEED) cycles
// from the start edge to done (one clear cycle, then the segments). start is
// ignored while busy.
//
// Reseeding from a seed table is the design's; the segment structure, the
// per-seed pattern count and the handshake are this implementation's choices.
module bist_ctrl #(
  parameter int unsigned NUM_SEEDS         = 4,
  parameter int unsigned PATTERNS_PER_SEED = 64,
  parameter int unsigned AW                = (NUM_SEEDS > 1) ? $clog2(NUM_SEEDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] seed_addr,
  output logic          tpg_load,
  output logic          tpg_en,
  output logic          misr_clr,
  output logic          misr_en,
  output logic          pattern_valid,
  output logic          reseed,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_CLEAR,
    S_LOAD,
    S_RUN
  } state_e;

  localparam int unsigned CW = (PATTERNS_PER_SEED > 1) ? $clog2(PATTERNS_PER_SEED) : 1;

  state_e        state;
  logic [CW-1:0] pat_cnt;
  logic          last_pat;
  logic          last_seed;

  assign last_pat  = (32'(pat_cnt) == PATTERNS_PER_SEED - 1);
  assign last_seed = (32'(seed_addr) == NUM_SEEDS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      seed_addr <= '0;
      pat_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state     <= S_CLEAR;
            seed_addr <= '0;
            done      <= 1'b0;
          end
        end
        S_CLEAR: state <= S_LOAD;
        S_LOAD: begin
          state   <= S_RUN;
          pat_cnt <= '0;
        end
        S_RUN: begin
          if (last_pat) begin
            if (last_seed) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state     <= S_LOAD;
              seed_addr <= seed_addr + 1'b1;
            end
          end else begin
            pat_cnt <= pat_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign misr_clr      = (state == S_CLEAR);
  assign tpg_load      = (state == S_LOAD);
  assign reseed        = tpg_load;
  assign pattern_valid = (state == S_RUN);
  assign tpg_en        = pattern_valid;
  assign misr_en       = pattern_valid;
  assign busy          = (state != S_IDLE);

endmodule
