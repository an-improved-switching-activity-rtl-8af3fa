// seed_rom: read-only table of LFSR seeds for reseeding.
//
// NUM_SEEDS words of N bits, read asynchronously: data = SEEDS[addr]. The
// reseeding controller walks through the table, loading one seed into the
// test pattern generator per test segment. Each seed starts the LFSR at a
// different point of its sequence, so a short run per seed reaches patterns
// spread over the whole sequence.
//
// Ports: addr[AW-1:0], data[N-1:0]. Combinational; an address past the last
// seed reads seed 0.
//
// Keeping seeds in a ROM is the design's; the number of seeds and their
// values are this implementation's defaults (SEEDS parameter).
module seed_rom #(
  parameter int unsigned N         = bist_pkg::N_DEFAULT,
  parameter int unsigned NUM_SEEDS = 4,
  parameter int unsigned AW        = (NUM_SEEDS > 1) ? $clog2(NUM_SEEDS) : 1,
  parameter logic [N-1:0] SEEDS [NUM_SEEDS] = '{N'('h01), N'('h5A), N'('hC3), N'('h96)}
) (
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  data
);

  always_comb begin
    if (32'(addr) < NUM_SEEDS)
      data = SEEDS[addr];
    else
      data = SEEDS[0];
  end

endmodule
