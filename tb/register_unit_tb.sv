// register_unit_tb -- random hold / load / increment / shift sequence against a reference.
// Also counts how often each operation was exercised; an operation never seen is a failure.
module register_unit_tb;
  localparam int W = 8;
  int checks = 0, failures = 0;
  int seen [5];
  logic clk = 0, rst, sin;
  logic [2:0] op;
  logic [W-1:0] d, q, ref_q;

  register_unit #(.W(W)) dut (.clk(clk), .rst(rst), .op(op), .d(d), .sin(sin), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; op = 0; d = 0; sin = 0; ref_q = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      op = 3'($urandom_range(0, 4)); d = W'($urandom); sin = 1'($urandom);
      seen[op]++;
      @(posedge clk);
      case (op)
        1: ref_q = d;
        2: ref_q = ref_q + 1;
        3: ref_q = (ref_q << 1) | W'(sin);
        4: ref_q = (ref_q >> 1) | (W'(sin) << (W - 1));
        default: ;
      endcase
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL op=%0d q=%h exp=%h", op, q, ref_q);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
