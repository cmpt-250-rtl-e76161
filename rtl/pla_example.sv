// pla_example -- the worked PLA example: f2 = xy + x'y'z' + y'z, f1 = z, f0 = xy + z.
//
// A 3-input, 4-product, 3-output PLA programmed with the personality matrix
//
//     product   x y z   f2 f1 f0
//     xy        1 1 -    1  -  1
//     x'y'z'    0 0 0    1  -  -
//     z         - - 1    -  1  1
//     y'z       - 0 1    1  -  -
//
// Product p is row p of the matrix, from the top; the product lines stay internal.
// Interface: x, y, z in; f2, f1, f0 out.
// Timing: combinational. The functions and the matrix are the lecture's; the mapping of
// the matrix to the pla parameters is this design's.
module pla_example (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic f2,
  output logic f1,
  output logic f0
);
  // input bit order {x, y, z} = in[2:0]
  localparam logic [3:0][2:0] AND_T = '{3'b001, 3'b001, 3'b000, 3'b110}; // rows 3,2,1,0
  localparam logic [3:0][2:0] AND_C = '{3'b010, 3'b000, 3'b111, 3'b000};
  // outputs {f2, f1, f0} = out[2:0]; each entry lists products 3..0
  localparam logic [2:0][3:0] OR_M  = '{4'b1011, 4'b0100, 4'b0101};

  logic [3:0] prod;
  logic [2:0] out;

  pla #(.N_IN(3), .N_PROD(4), .N_OUT(3), .AND_T(AND_T), .AND_C(AND_C), .OR_M(OR_M))
    u_pla (.in({x, y, z}), .prod(prod), .out(out));

  assign {f2, f1, f0} = out;
endmodule
