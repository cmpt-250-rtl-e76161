// flip_flop_tb -- random enable/data sequence against a one-bit reference.
module flip_flop_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, d, q, ref_q;

  flip_flop dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = 0; ref_q = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      en = 1'($urandom); d = 1'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d q=%b exp=%b", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
