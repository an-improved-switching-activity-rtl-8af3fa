// lfsr: reseedable Fibonacci linear feedback shift register.
//
// Every enabled clock the register shifts one place from stage 0 towards
// stage N-1 and stage 0 takes the XOR of the tapped stages (TAPS mask). TAPS
// defaults to the primitive mask bist_pkg::lfsr_taps(N), so any width from 3
// to 32 runs through all 2^N - 1 non-zero states; with the default 8 bits the
// taps are stages 7, 3, 2, 1 and the period is 255. Stage N-1 is the serial
// output.
// A one-cycle `load` pulse writes `seed` into the register (reseeding); load
// has priority over `en`. An all-zero seed would lock the register, so a zero
// seed is replaced by 1.
//
// Ports: clk, rst_n (synchronous, active low, state <- 1), en, load,
// seed[N-1:0], q[N-1:0] (the current pattern, registered), out (= q[N-1]).
// Timing: q changes on the clock edge after en or load; no combinational path
// from inputs to outputs.
//
// The 8-bit width, the shift direction, the tap positions and the seed input
// follow the design, as does a length set by a parameter; the tap table for
// other widths, the reset value, the load priority and the zero-seed guard are
// this implementation's choices.
module lfsr #(
  parameter int unsigned    N    = bist_pkg::N_DEFAULT,
  parameter logic [N-1:0]   TAPS = N'(bist_pkg::lfsr_taps(N))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] q,
  output logic         out
);

  logic fb;

  initial assert (TAPS != '0) else $error("lfsr: no feedback taps for N=%0d", N);

  assign fb  = ^(q & TAPS);
  assign out = q[N-1];

  always_ff @(posedge clk) begin
    if (!rst_n)
      q <= N'(1);
    else if (load)
      q <= (seed == '0) ? N'(1) : seed;
    else if (en)
      q <= {q[N-2:0], fb};
  end

endmodule
