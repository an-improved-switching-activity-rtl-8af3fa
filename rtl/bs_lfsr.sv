// bs_lfsr: bit-swapping LFSR test pattern generator.
//
// A reseedable fixed-polynomial LFSR (lfsr) produces one pseudo-random pattern
// per enabled clock; the MUX selection stage (bit_swap_mux) re-orders each
// pattern so that successive patterns differ in fewer bits, lowering the
// switching activity the pattern causes in the circuit under test. The set of
// patterns over a full period is the same as the plain LFSR's.
//
// Ports: clk, rst_n, en (advance one pattern), load + seed (reseed), swap_en
// (1: bit swapping on, 0: plain LFSR pattern), pattern[N-1:0] (to the CUT),
// lfsr_q[N-1:0] (raw LFSR state, for observation).
// Timing: pattern is the combinational image of the registered LFSR state, so
// it changes right after the clock edge that advanced or reseeded the LFSR,
// and right after swap_en changes.
//
// The structure (seed input, LFSR with feedback polynomial, MUX selection
// producing the test pattern) follows the design's block diagram.
module bs_lfsr #(
  parameter int unsigned  N    = bist_pkg::N_DEFAULT,
  parameter logic [N-1:0] TAPS = N'(bist_pkg::lfsr_taps(N))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         swap_en,
  output logic [N-1:0] pattern,
  output logic [N-1:0] lfsr_q
);

  logic unused_out;

  lfsr #(.N(N), .TAPS(TAPS)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .load  (load),
    .seed  (seed),
    .q     (lfsr_q),
    .out   (unused_out)
  );

  bit_swap_mux #(.N(N)) u_swap (
    .in      (lfsr_q),
    .swap_en (swap_en),
    .out     (pattern)
  );

endmodule
