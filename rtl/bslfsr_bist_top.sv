// bslfsr_bist_top: low-switching-activity logic BIST engine.
//
// Test pattern side: bist_ctrl walks through the seeds of seed_rom, reseeding
// the bit-swapping LFSR (bs_lfsr) once per segment and advancing it one
// pattern per cycle. The patterns leave on test_pattern towards the circuit
// under test, which is outside this module; its response comes back on
// cut_response in the same cycle (a combinational CUT is assumed) and is
// compacted by the programmable MISR into `signature`. When done rises the
// signature is final and can be compared with a fault-free reference.
//
// Beside the engine sits an N-stage BILBO register with its own ports
// (bilbo_*): a register that can serve as scan chain, pattern generator,
// plain register or signature register at a block boundary.
//
// Ports:
//   clk, rst_n                 clock, synchronous active-low reset
//   start, swap_en             start a test; 1 = bit swapping on
//   misr_poly[N-1:0]           MISR feedback mask (bit i = stage i tapped)
//   test_pattern[N-1:0]        pattern to the CUT, valid while pattern_valid
//   cut_response[N-1:0]        CUT response, sampled while pattern_valid
//   signature[N-1:0], busy, done
//   bilbo_b1, bilbo_b2, bilbo_si, bilbo_d[N-1:0] -> bilbo_q[N-1:0], bilbo_so
// Timing: a test takes 1 + NUM_SEEDS * (1 + PATTERNS_PER_SEED) cycles after
// start; with the defaults 261 cycles for 256 patterns.
//
// The blocks and their roles follow the design; the controller's sequencing,
// the seed values and counts, and the same-cycle response are this
// implementation's choices.
module bslfsr_bist_top #(
  parameter int unsigned  N                 = bist_pkg::N_DEFAULT,
  parameter logic [N-1:0] TAPS              = N'(bist_pkg::lfsr_taps(N)),
  parameter int unsigned  NUM_SEEDS         = 4,
  parameter int unsigned  PATTERNS_PER_SEED = 64,
  parameter logic [N-1:0] SEEDS [NUM_SEEDS] = '{N'('h01), N'('h5A), N'('hC3), N'('h96)}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         swap_en,
  input  logic [N-1:0] misr_poly,
  output logic [N-1:0] test_pattern,
  output logic         pattern_valid,
  input  logic [N-1:0] cut_response,
  output logic [N-1:0] signature,
  output logic         busy,
  output logic         done,
  input  logic         bilbo_b1,
  input  logic         bilbo_b2,
  input  logic         bilbo_si,
  input  logic [N-1:0] bilbo_d,
  output logic [N-1:0] bilbo_q,
  output logic         bilbo_so
);

  localparam int unsigned AW = (NUM_SEEDS > 1) ? $clog2(NUM_SEEDS) : 1;

  logic [AW-1:0] seed_addr;
  logic [N-1:0]  seed;
  logic          tpg_load, tpg_en, misr_clr, misr_en;

  bist_ctrl #(
    .NUM_SEEDS         (NUM_SEEDS),
    .PATTERNS_PER_SEED (PATTERNS_PER_SEED),
    .AW                (AW)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .seed_addr     (seed_addr),
    .tpg_load      (tpg_load),
    .tpg_en        (tpg_en),
    .misr_clr      (misr_clr),
    .misr_en       (misr_en),
    .pattern_valid (pattern_valid),
    .reseed        (),
    .busy          (busy),
    .done          (done)
  );

  seed_rom #(
    .N         (N),
    .NUM_SEEDS (NUM_SEEDS),
    .AW        (AW),
    .SEEDS     (SEEDS)
  ) u_rom (
    .addr (seed_addr),
    .data (seed)
  );

  bs_lfsr #(.N(N), .TAPS(TAPS)) u_tpg (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (tpg_en),
    .load    (tpg_load),
    .seed    (seed),
    .swap_en (swap_en),
    .pattern (test_pattern),
    .lfsr_q  ()
  );

  misr #(.N(N)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (misr_clr),
    .en    (misr_en),
    .poly  (misr_poly),
    .r     (cut_response),
    .sig   (signature)
  );

  bilbo #(.N(N), .TAPS(TAPS)) u_bilbo (
    .clk   (clk),
    .rst_n (rst_n),
    .b1    (bilbo_b1),
    .b2    (bilbo_b2),
    .si    (bilbo_si),
    .d     (bilbo_d),
    .q     (bilbo_q),
    .so    (bilbo_so)
  );

endmodule
