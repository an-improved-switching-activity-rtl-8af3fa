// bilbo: built-in logic block observer register, N stages (8 by default).
//
// One register that the control pair {B1, B2} turns into one of four things:
//   00  serial scan chain:   Q1 <= SI, Qi <= Q(i-1); SO = Qn
//   01  LFSR pattern gen.:   Q1 <= feedback, Qi <= Q(i-1); parallel inputs ignored
//   10  normal D register:   Qi <= Di
//   11  MISR compactor:      Q1 <= feedback ^ D1, Qi <= Q(i-1) ^ Di
// The feedback is the XOR of the stages selected by TAPS (default stages
// Qn, Q4, Q3, Q2, the same primitive polynomial as the 8-bit LFSR) and
// enters the first stage through the 2:1 multiplexer whose other input is SI.
// Stage Qi is q[i-1] here.
//
// Ports: clk, rst_n (synchronous, active low, clears all stages), b1, b2,
// si, d[N-1:0] (parallel data from the logic in front), q[N-1:0] (parallel
// outputs), so (= q[N-1]). All outputs are registered; the mode takes effect
// on the next clock edge. Reset clears the register, and an all-zero register
// stays zero in LFSR mode, so a non-zero start state is first scanned in (00)
// or loaded (10).
//
// The four modes and their encoding, the SI multiplexer, the serial output
// from the last stage and the width are the design's; the tap positions and
// the reset are this implementation's choices.
module bilbo #(
  parameter int unsigned  N    = bist_pkg::N_DEFAULT,
  parameter logic [N-1:0] TAPS = N'(bist_pkg::lfsr_taps(N))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         b1,
  input  logic         b2,
  input  logic         si,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         so
);

  import bist_pkg::*;

  bilbo_mode_e mode;
  logic        fb;
  logic        first_in;

  assign mode     = bilbo_mode_e'({b1, b2});
  assign fb       = ^(q & TAPS);
  // 2:1 multiplexer in front of the first stage: SI in scan mode, feedback otherwise
  assign first_in = (mode == BILBO_SCAN) ? si : fb;
  assign so       = q[N-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      unique case (mode)
        BILBO_SCAN:   q <= {q[N-2:0], first_in};
        BILBO_LFSR:   q <= {q[N-2:0], first_in};
        BILBO_NORMAL: q <= d;
        BILBO_MISR:   q <= {q[N-2:0], first_in} ^ d;
      endcase
    end
  end

endmodule
