// misr: programmable multiple input signature register (response compactor).
//
// Each enabled clock the register shifts one place from stage 0 towards stage
// N-1, stage 0 takes the XOR of the stages selected by `poly`, and the whole
// shifted word is XORed with the N response bits r. After a test the register
// holds a signature of every response it has seen; a faulty response changes
// the signature (up to aliasing, about 2^-N).
// The feedback polynomial is a run-time input so that one register can be
// programmed for different compaction polynomials.
//
// Ports: clk, rst_n (synchronous, active low, clears), clr (synchronous clear,
// priority over en), en (compact r this cycle), poly[N-1:0] (feedback mask,
// bit i = stage i tapped), r[N-1:0] (CUT response), sig[N-1:0] (signature).
// Timing: r is sampled on the clock edge on which en is high; sig is
// registered.
//
// The 8-bit width and the programmable MISR are the design's; the shift
// direction, the mask form of the polynomial and the clear are this
// implementation's choices, matching the LFSR.
module misr #(
  parameter int unsigned N = bist_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] poly,
  input  logic [N-1:0] r,
  output logic [N-1:0] sig
);

  logic fb;

  assign fb = ^(sig & poly);

  always_ff @(posedge clk) begin
    if (!rst_n || clr)
      sig <= '0;
    else if (en)
      sig <= {sig[N-2:0], fb} ^ r;
  end

endmodule
