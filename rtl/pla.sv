// pla -- programmable logic array (programmable AND plane, programmable OR plane).
//
// Each of the N_PROD horizontal product lines ANDs together the input literals whose
// connections are kept: AND_T[p][i] keeps the true literal of input i on product p,
// AND_C[p][i] keeps its complement. Each of the N_OUT output lines ORs together the
// products whose connection OR_M[o][p] is kept, so every output is a sum of products.
// A set bit means "connection kept" (an "X" in a PLD schematic); programming a device
// means clearing the bits of the fuses that are blown.
//
// Interface: in[N_IN-1:0] -> out[N_OUT-1:0], plus the product lines for observation.
// Timing: purely combinational.
//
// The structure and the default size (3 inputs, 8 product terms, 4 outputs, as in the
// unprogrammed 3x4 device with 8 product terms) follow the lecture's PLD description.
// The defaults keep every fuse intact, as an unprogrammed device has them: each product
// then contains x and x', so every output is 0. The mask encoding is this design's own.
module pla #(
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_PROD = 8,
  parameter int unsigned N_OUT  = 4,
  parameter logic [N_PROD-1:0][N_IN-1:0]  AND_T = '1,
  parameter logic [N_PROD-1:0][N_IN-1:0]  AND_C = '1,
  parameter logic [N_OUT-1:0][N_PROD-1:0] OR_M  = '1
) (
  input  logic [N_IN-1:0]   in,
  output logic [N_PROD-1:0] prod,
  output logic [N_OUT-1:0]  out
);
  // product array
  always_comb begin
    for (int p = 0; p < N_PROD; p++)
      prod[p] = &((in | ~AND_T[p]) & (~in | ~AND_C[p]));
  end

  // sum array
  always_comb begin
    for (int o = 0; o < N_OUT; o++)
      out[o] = |(prod & OR_M[o]);
  end
endmodule
