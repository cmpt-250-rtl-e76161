// sync_mem_ctrl_tb -- drives the cs / r / ack handshake directly. Every access must be
// acknowledged in the cycle after the controller sees cs in MEM1: one clock edge after cs
// rises while it waits in MEM1, two when cs rises again during the MEM2 of the previous access, reads must return
// the last value written (reference array), and ack must be one cycle long.
module sync_mem_ctrl_tb;
  int checks = 0, failures = 0, reads = 0, writes = 0;
  logic clk = 0, rst, cs, r, ack;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [256];
  logic [255:0] known;

  sync_mem_ctrl dut (.clk(clk), .rst(rst), .cs(cs), .r(r), .addr(addr), .wdata(wdata),
    .ack(ack), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, gap;
    gap = 1;
    known = '0;
    rst = 1; cs = 0; r = 0; addr = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      cs = 1; r = 1'($urandom); addr = 8'($urandom % 32); wdata = 8'($urandom);
      lat = 0;
      do begin @(posedge clk); #1 lat++; end while (!ack && lat < 10);
      checks++;
      if (lat != (gap == 0 ? 2 : 1)) begin failures++; $display("FAIL latency %0d", lat); end
      if (r) begin
        reads++;
        if (known[addr]) begin
          checks++;
          if (rdata !== model[addr]) begin
            failures++;
            $display("FAIL read %h = %h exp %h", addr, rdata, model[addr]);
          end
        end
      end else begin
        writes++; model[addr] = wdata; known[addr] = 1;
      end
      cs = 0;
      gap = $urandom_range(0, 2);
      repeat (gap) begin
        @(posedge clk); #1;
        checks++;
        if (ack) failures++;
      end
    end
    checks++;
    if (reads == 0 || writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
