// sram_tb -- the asynchronous SRAM model: latch writes, reads, and retention while
// deselected or while another word is written, against an array reference.
module sram_tb;
  int checks = 0, failures = 0;
  logic cs_n, rw;
  logic [7:0] addr, din, dout;
  logic [7:0] model [256];
  logic [255:0] known;

  sram dut (.cs_n(cs_n), .rw(rw), .addr(addr), .din(din), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known = '0;
    cs_n = 1; rw = 1; addr = 0; din = 0;
    for (int i = 0; i < 3000; i++) begin
      // set up address and data with the chip deselected, then pulse cs_n
      cs_n = 1; #1;
      addr = 8'($urandom); din = 8'($urandom); rw = 1'($urandom); #1;
      if (cs_n == 1) begin
        checks++;
        if (dout !== 8'h00) failures++;
      end
      cs_n = 1'($urandom_range(0, 9) == 0);   // occasionally stay deselected
      #2;
      if (!cs_n && !rw) begin
        model[addr] = din;
        known[addr] = 1'b1;
      end else if (!cs_n && rw && known[addr]) begin
        checks++;
        if (dout !== model[addr]) begin
          failures++;
          $display("FAIL read %h = %h exp %h", addr, dout, model[addr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
