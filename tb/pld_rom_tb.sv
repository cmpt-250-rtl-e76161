// pld_rom_tb -- self-checking test of the ROM built as a PLD.
// A 4-input, 8-output ROM holds the function table m -> (5*m + 3) mod 256 xor (m << 4);
// every address is read and compared with the formula. A default instance (3 inputs,
// 4 outputs) must hold word m = {parity(m), m}.
module pld_rom_tb;
  int checks = 0, failures = 0;

  function automatic logic [7:0] f(int m);
    return 8'((5 * m + 3) ^ (m << 4));
  endfunction

  function automatic logic [15:0][7:0] table_of();
    logic [15:0][7:0] r;
    for (int m = 0; m < 16; m++) r[m] = f(m);
    return r;
  endfunction

  logic [3:0] addr;
  logic [7:0] data;
  pld_rom #(.N_IN(4), .N_OUT(8), .CONTENTS(table_of())) dut (.addr(addr), .data(data));

  logic [2:0] addr_d;
  logic [3:0] data_d;
  pld_rom dut_default (.addr(addr_d), .data(data_d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      addr = 4'(m);
      #1;
      checks++;
      if (data !== f(m)) begin
        failures++;
        $display("FAIL addr=%0d data=%h exp=%h", m, data, f(m));
      end
    end
    for (int m = 0; m < 8; m++) begin
      addr_d = 3'(m);
      #1;
      checks++;
      if (data_d !== {^addr_d, addr_d}) begin
        failures++;
        $display("FAIL default addr=%0d data=%h", m, data_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
