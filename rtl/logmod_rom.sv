// logmod_rom: discrete-logarithm table for the Linear Permutation Network.
//
// For a prime M and a generator G of the multiplicative group modulo M,
// maps x in 1..M-1 to j = log_mod(x), the exponent with G^j mod M = x.
// The first subnetwork of the LPN multiplies by x by rotating j places, so the
// controller looks j up here. The table is filled at elaboration from
// G^k mod M (k = 0..M-2), so only M and G need be given. x = 0 has no
// logarithm: it reads 0 and raises `zero` (the sequential special case).
// Combinational ROM. Table contents follow the source design; the `zero` flag is
// this implementation's choice.
module logmod_rom
  import pms_pkg::*;
#(
  parameter int unsigned M = 7,
  parameter int unsigned G = 3,
  localparam int unsigned BW = idx_w(M),
  localparam int unsigned JW = idx_w(M-1)
) (
  input  logic [BW-1:0] x,
  output logic [JW-1:0] j,
  output logic          zero
);
  logic [JW-1:0] rom [M];

  assign rom[0] = '0;
  for (genvar k = 0; k < M - 1; k++) begin : g_fill
    assign rom[pow_mod(G, k, M)] = JW'(k);
  end

  always_comb begin
    zero = (x == '0) || (int'(x) >= int'(M));
    j    = zero ? '0 : rom[x];
  end

  if (!is_prime(M)) begin : g_bad_m
    $error("logmod_rom: M must be prime");
  end
  if (!is_generator(G, M)) begin : g_bad_g
    $error("logmod_rom: G must generate the multiplicative group modulo M");
  end
endmodule
