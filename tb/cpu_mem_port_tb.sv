// cpu_mem_port_tb -- the CPU-side handshake against a behavioural memory that answers
// after a random number of cycles. Checks that cs, r, addr and data are held until ack,
// that cs drops after ack, that MDR receives the memory data on a retrieval, and that the
// memory sees every storage.
module cpu_mem_port_tb;
  int checks = 0, failures = 0, reads = 0, writes = 0;
  logic clk = 0, rst, start, we, busy, done, mem_cs, mem_r, mem_ack;
  logic [7:0] req_addr, mem_addr;
  logic [7:0] req_data, mdr, mem_wdata, mem_rdata;
  logic [7:0] mem [256];

  cpu_mem_port dut (.clk(clk), .rst(rst), .start(start), .we(we), .req_addr(req_addr),
    .req_data(req_data), .busy(busy), .done(done), .mdr(mdr), .mem_addr(mem_addr),
    .mem_cs(mem_cs), .mem_r(mem_r), .mem_wdata(mem_wdata), .mem_ack(mem_ack),
    .mem_rdata(mem_rdata));
  always #5 clk = ~clk;

  // behavioural memory: ack after 0..3 wait cycles, one cycle long
  int wait_left = -1;
  always_ff @(posedge clk) begin
    if (rst) begin
      mem_ack <= 0; wait_left <= -1;
    end else if (mem_ack) begin
      mem_ack <= 0;
    end else if (mem_cs) begin
      if (wait_left < 0) wait_left <= $urandom_range(0, 3);
      else if (wait_left == 0) begin
        mem_ack <= 1; wait_left <= -1;
        if (mem_r) mem_rdata <= mem[mem_addr];
        else mem[mem_addr] <= mem_wdata;
      end else wait_left <= wait_left - 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model [256];
    logic [7:0] a, v;
    logic w;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7); model[i] = 8'(i * 7); end
    rst = 1; start = 0; we = 0; req_addr = 0; req_data = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      w = 1'($urandom); a = 8'($urandom); v = 8'($urandom);
      start = 1; we = w; req_addr = a; req_data = v;
      @(posedge clk); #1 start = 0; req_addr = ~a; req_data = ~v;
      // hold checks until ack
      while (!mem_ack) begin
        checks++;
        if (!mem_cs || mem_r !== !w || mem_addr !== a || (w && mem_wdata !== v)) begin
          failures++;
          $display("FAIL bus not held: cs=%b r=%b addr=%h", mem_cs, mem_r, mem_addr);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (!done) failures++;
      @(posedge clk); #1;
      checks++;
      if (mem_cs) begin failures++; $display("FAIL cs held after ack"); end
      if (w) begin model[a] = v; writes++; end
      else begin
        reads++;
        checks++;
        if (mdr !== model[a]) begin
          failures++;
          $display("FAIL MDR %h exp %h", mdr, model[a]);
        end
      end
    end
    checks++;
    if (reads == 0 || writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
