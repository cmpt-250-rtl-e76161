// pla_example_tb -- checks the worked PLA example against its three sum-of-products
// equations for all eight input combinations.
module pla_example_tb;
  int checks = 0, failures = 0;
  logic x, y, z, f2, f1, f0;

  pla_example dut (.x(x), .y(y), .z(z), .f2(f2), .f1(f1), .f0(f0));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e2, e1, e0;
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      e2 = (x & y) | (!x & !y & !z) | (!y & z);
      e1 = z;
      e0 = (x & y) | z;
      checks++;
      if ({f2, f1, f0} !== {e2, e1, e0}) begin
        failures++;
        $display("FAIL xyz=%b%b%b got=%b%b%b exp=%b%b%b", x, y, z, f2, f1, f0, e2, e1, e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
