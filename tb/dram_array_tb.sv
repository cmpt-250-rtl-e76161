// dram_array_tb -- the DRAM matrix model: a written word reads back once; a second read
// without write-back reports the word lost; a word left longer than RETENTION cycles is
// lost; a word rewritten in time is kept.
module dram_array_tb;
  localparam int RET = 50;
  int checks = 0, failures = 0;
  logic clk = 0, rst, rd, wr, lost;
  logic [3:0] addr;
  logic [15:0] wdata, rdata;

  dram_array #(.ADDR_W(4), .W(16), .RETENTION(RET)) dut (.clk(clk), .rst(rst), .row(addr),
    .rd(rd), .wr(wr), .wdata(wdata), .rdata(rdata), .lost(lost));
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input logic [3:0] a, input logic [15:0] v);
    addr = a; wdata = v; wr = 1; rd = 0;
    @(posedge clk); #1 wr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rd = 0; wr = 0; addr = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    // never-written word: no loss reported
    addr = 4'd9; rd = 1; #1;
    chk(!lost, "unwritten word flagged");
    @(posedge clk); #1 rd = 0;
    // destructive read
    write(4'd3, 16'hBEEF);
    addr = 4'd3; rd = 1; #1;
    chk(rdata == 16'hBEEF && !lost, "first read");
    @(posedge clk); #1;
    chk(rdata == 16'h0 && lost, "second read after destructive read");
    @(posedge clk); #1 rd = 0;
    // refresh in time keeps the value
    write(4'd5, 16'h1234);
    for (int k = 0; k < 4; k++) begin
      repeat (RET - 5) @(posedge clk);
      #1 addr = 4'd5; rd = 1; #1;
      chk(rdata == 16'h1234 && !lost, "refreshed read");
      wdata = rdata; wr = 1;         // read and write back in one cycle
      @(posedge clk); #1 rd = 0; wr = 0;
    end
    // decay
    write(4'd7, 16'hCAFE);
    repeat (RET + 2) @(posedge clk);
    #1 addr = 4'd7; rd = 1; #1;
    chk(rdata == 16'h0 && lost, "decayed word");
    @(posedge clk); #1 rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
