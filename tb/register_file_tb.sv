// register_file_tb -- random simultaneous reads and writes against an array reference.
// The read in a cycle that writes the same register must see the old value; with the read
// control point off the output is 0.
module register_file_tb;
  localparam int N = 32, W = 32, AW = 5;
  int checks = 0, failures = 0, same_cycle = 0;
  logic clk = 0, rst, we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [N];

  register_file #(.N_REGS(N), .W(W)) dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr),
    .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); waddr = AW'($urandom); wdata = $urandom;
      raddr = (i % 4 == 0) ? waddr : AW'($urandom);
      re = (i % 8 != 7);
      #1;
      checks++;
      if (rdata !== (re ? model[raddr] : '0)) begin
        failures++;
        $display("FAIL read r%0d=%h exp=%h", raddr, rdata, model[raddr]);
      end
      if (we && raddr == waddr) same_cycle++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    checks++;
    if (same_cycle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
