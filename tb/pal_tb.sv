// pal_tb -- self-checking test of the PAL.
// A 3-input PAL with three outputs of three product terms each is programmed with
// f2 = xy + x'y'z' + y'z, f1 = z, f0 = xy + z (unused products hold x and x'), and compared
// with those expressions for every input; an unprogrammed device must give all zeros.
module pal_tb;
  int checks = 0, failures = 0;
  logic [2:0] in, out, out_u;
  logic [3:0] out_def;

  localparam logic [8:0][2:0] T = '{3'b001, 3'b000, 3'b110, 3'b100, 3'b100, 3'b001,
                                    3'b100, 3'b001, 3'b110};
  localparam logic [8:0][2:0] C = '{3'b010, 3'b111, 3'b000, 3'b100, 3'b100, 3'b000,
                                    3'b100, 3'b000, 3'b000};

  pal #(.N_IN(3), .N_OUT(3), .PROD_PER_OUT(3), .AND_T(T), .AND_C(C)) dut (.in(in), .out(out));
  pal dut_unprog (.in(in), .out(out_def));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y, z;
    logic [2:0] exp;
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      {x, y, z} = in;
      exp[2] = (x & y) | (!x & !y & !z) | (!y & z);
      exp[1] = z;
      exp[0] = (x & y) | z;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", in, out, exp);
      end
      checks++;
      if (out_def !== 4'b0) begin
        failures++;
        $display("FAIL unprogrammed in=%b out=%b", in, out_def);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
