// dram_ctrl_check -- test sequence for the DRAM controller with the DRAM matrix model
// (16 words in rows of ROW_WORDS, retention RET cycles), used by dram_ctrl_tb.
// Random reads and writes with random gaps, back-to-back requests and idle
// stretches several times the retention time. Checks: read data against a reference
// array, no word ever lost (write-back after destructive reads, refresh in time),
// request latency of 2 to 5 cycles from cs to ack (2 from an idle M0, 5 back to back),
// and at least one refresh between two requests. Counts reads, writes, back-to-back requests, refreshes and idle stretches.
module dram_ctrl_check #(
  parameter int ROW_WORDS = 1,
  parameter int RET       = 100
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int AW = 4, W = 16;
  localparam int RW = AW - $clog2(ROW_WORDS);
  int acks_seen = 0;
  int reads = 0, writes = 0, b2b = 0, refreshes = 0, idles = 0, refresh_since_req = 0;
  logic rst, cs, rw, ack, arr_rd, arr_wr, lost;
  logic [AW-1:0] addr;
  logic [RW-1:0] arr_row;
  logic [W-1:0] wdata, rdata;
  logic [ROW_WORDS*W-1:0] arr_wdata, arr_rdata;
  logic [W-1:0] model [1 << AW];

  dram_ctrl #(.ADDR_W(AW), .W(W), .ROW_WORDS(ROW_WORDS)) dut (.clk(clk), .rst(rst), .cs(cs), .rw(rw), .addr(addr),
    .wdata(wdata), .ack(ack), .rdata(rdata), .arr_row(arr_row), .arr_rd(arr_rd),
    .arr_wr(arr_wr), .arr_wdata(arr_wdata), .arr_rdata(arr_rdata));
  dram_array #(.ADDR_W(AW), .W(W), .ROW_WORDS(ROW_WORDS), .RETENTION(RET)) u_arr (.clk(clk),
    .rst(rst), .row(arr_row), .rd(arr_rd), .wr(arr_wr), .wdata(arr_wdata), .rdata(arr_rdata),
    .lost(lost));

  // refresh write-backs (a write with cs low and no ack pending is a refresh, M1)
  always @(posedge clk) begin
    if (!rst && arr_wr && !ack) begin
      refreshes++;
      refresh_since_req++;
    end
    if (!rst && ack) begin
      if (acks_seen > 0) begin
        checks++;
        if (refresh_since_req == 0) begin
          failures++;
          $display("FAIL two requests without a refresh between them");
        end
      end
      acks_seen++;
      refresh_since_req = 0;
    end
    if (!rst && lost) begin
      failures++;
      $display("FAIL word lost at array row %0d", arr_row);
    end
  end


  task automatic request(input logic r, input logic [AW-1:0] a, input logic [W-1:0] v);
    int lat;
    cs = 1; rw = r; addr = a; wdata = v;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!ack && lat < 20);
    checks++;
    if (lat < 2 || lat > 5) begin failures++; $display("FAIL latency %0d", lat); end
    if (r) begin
      reads++;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL read %0d = %h exp %h", a, rdata, model[a]);
      end
    end else begin
      writes++;
      model[a] = v;
    end
    cs = 0;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    rst = 1; cs = 0; rw = 0; addr = 0; wdata = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < (1 << AW); i++) request(0, AW'(i), W'($urandom));
    for (int i = 0; i < 3000; i++) begin
      int gap;
      gap = $urandom_range(0, 99) < 3 ? 3 * RET : $urandom_range(0, 3);
      if (gap == 0) b2b++;
      if (gap > RET) idles++;
      repeat (gap) @(posedge clk);
      #1;
      if (i > 0 && gap == 0) begin
        // back to back: the controller must still refresh once before taking this one
        request(1'($urandom), AW'($urandom), W'($urandom));
        checks++;
        if (refreshes == 0) failures++;
      end else begin
        request(1'($urandom), AW'($urandom), W'($urandom));
      end
    end
    // final sweep: every word still holds its value
    for (int i = 0; i < (1 << AW); i++) request(1, AW'(i), '0);
    checks++;
    if (reads == 0 || writes == 0 || b2b == 0 || idles == 0 || refreshes == 0) begin
      failures++;
      $display("FAIL coverage reads=%0d writes=%0d b2b=%0d idles=%0d refreshes=%0d",
               reads, writes, b2b, idles, refreshes);
    end
    $display("ROW_WORDS=%0d: reads=%0d writes=%0d back-to-back=%0d idle=%0d refreshes=%0d",
             ROW_WORDS, reads, writes, b2b, idles, refreshes);
    done = 1;
  end
endmodule
