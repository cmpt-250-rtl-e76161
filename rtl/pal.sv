// pal -- programmable array logic: programmable AND plane, hard-wired OR plane.
//
// The device has N_OUT outputs, each permanently wired to its own group of
// PROD_PER_OUT product terms: output o is the OR of products o*PROD_PER_OUT ..
// o*PROD_PER_OUT+PROD_PER_OUT-1. Only the product terms are programmed: AND_T[p][i] keeps
// the true literal of input i on product p, AND_C[p][i] its complement. A function that
// needs more product terms than PROD_PER_OUT does not fit. An unused product term is made
// 0 by keeping both literals of one input (the unprogrammed state).
//
// Interface: in[N_IN-1:0] -> out[N_OUT-1:0]. Timing: combinational.
//
// The programmable-AND / fixed-OR split is from the lecture; the sizes (3 inputs,
// 4 outputs, 2 products each) and the mask encoding are this design's own choice.
module pal #(
  parameter int unsigned N_IN         = 3,
  parameter int unsigned N_OUT        = 4,
  parameter int unsigned PROD_PER_OUT = 2,
  parameter logic [N_OUT*PROD_PER_OUT-1:0][N_IN-1:0] AND_T = '1,
  parameter logic [N_OUT*PROD_PER_OUT-1:0][N_IN-1:0] AND_C = '1
) (
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out
);
  localparam int unsigned N_PROD = N_OUT * PROD_PER_OUT;
  logic [N_PROD-1:0] prod;

  always_comb begin
    for (int p = 0; p < N_PROD; p++)
      prod[p] = &((in | ~AND_T[p]) & (~in | ~AND_C[p]));
  end

  // fixed OR plane
  always_comb begin
    for (int o = 0; o < N_OUT; o++)
      out[o] = |prod[o*PROD_PER_OUT +: PROD_PER_OUT];
  end
endmodule
