// bit_swap_mux: MUX selection stage of the bit-swapping LFSR.
//
// A bank of 2:1 multiplexers re-orders the LFSR pattern. The selector is the
// LFSR's last stage, in[N-1], which itself passes straight through. When the
// selector is 1 (and swapping is enabled) the outputs of each adjacent pair of
// stages (0,1), (2,3), ... below N-1 are exchanged; otherwise the pattern
// passes unchanged. If N-1 is odd the stage just below N-1 has no partner and
// passes through. Because the selector is not moved, the mapping is one-to-one
// and a full LFSR period still yields every non-zero pattern exactly once,
// while the bit transitions between successive patterns drop (over the full
// period of the default 8-bit LFSR: 832 instead of 1024, about 19 % fewer).
//
// Ports: in[N-1:0] LFSR pattern, swap_en (switch that enables the swapping),
// out[N-1:0] pattern to the CUT. Purely combinational. out[N-1] (the
// selector) and, for even N, out[N-2] are wires straight from the input.
//
// That MUXes re-order the LFSR pattern to lower switching activity is the
// design's idea; the pairing of adjacent stages, the choice of selector stage
// and its polarity, and the enable switch are this implementation's choices.
module bit_swap_mux #(
  parameter int unsigned N = bist_pkg::N_DEFAULT
) (
  input  logic [N-1:0] in,
  input  logic         swap_en,
  output logic [N-1:0] out
);

  logic sel;

  assign sel = swap_en & in[N-1];

  always_comb begin
    out = in;
    for (int unsigned i = 0; i + 1 < N - 1; i += 2) begin
      out[i]   = sel ? in[i+1] : in[i];
      out[i+1] = sel ? in[i]   : in[i+1];
    end
  end

endmodule
