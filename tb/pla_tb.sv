// pla_tb -- self-checking test of the generic PLA.
// Checks an unprogrammed 3x4 device with 8 product terms (every output 0) and the same
// device programmed as: out0 = parity(x,y,z) (four minterm products), out1 = majority
// (xy + xz + yz), out2 = x'y', out3 = parity + x'y' (products shared between outputs).
// Every input combination is compared with the functions written as expressions.
module pla_tb;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic [7:0] prod_u, prod_p;
  logic [3:0] out_u, out_p;

  // input order {x, y, z}; products p7..p0
  localparam logic [7:0][2:0] T = '{3'b000, 3'b011, 3'b101, 3'b110,   // x'y', yz, xz, xy
                                    3'b111, 3'b100, 3'b010, 3'b001};  // xyz, xy'z', x'yz', x'y'z
  localparam logic [7:0][2:0] C = '{3'b110, 3'b000, 3'b000, 3'b000,
                                    3'b000, 3'b011, 3'b101, 3'b110};
  localparam logic [3:0][7:0] O = '{8'b1000_1111, 8'b1000_0000, 8'b0111_0000, 8'b0000_1111};

  pla dut_unprog (.in(in), .prod(prod_u), .out(out_u));
  pla #(.AND_T(T), .AND_C(C), .OR_M(O)) dut (.in(in), .prod(prod_p), .out(out_p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y, z;
    logic [3:0] exp;
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      {x, y, z} = in;
      exp[0] = x ^ y ^ z;
      exp[1] = (x & y) | (x & z) | (y & z);
      exp[2] = !x & !y;
      exp[3] = exp[0] | exp[2];
      checks++;
      if (out_p !== exp) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", in, out_p, exp);
      end
      checks++;
      if (out_u !== 4'b0 || prod_u !== 8'b0) begin
        failures++;
        $display("FAIL unprogrammed in=%b out=%b", in, out_u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
