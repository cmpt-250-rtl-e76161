// sram -- behavioural model of an asynchronous static RAM (not synthesizable logic).
//
// 2^ADDR_W words of W bits, each bit a D latch. With chip select active (cs_n = 0) and
// rw = 0 the addressed word is transparent to din: it follows din for as long as the
// write lasts. With cs_n = 0 and rw = 1 the addressed word appears on dout. Deselected,
// the contents stay as they are and dout is 0. There is no clock: the model is a
// level-sensitive latch array, as the device is. A word is read or written, never both.
// Interface: cs_n, rw, addr, din in; dout out. The real device has one bidirectional data
// bus; here it is split into din and dout (dout is driven only during a read).
// Active-low chip select, the r/w select and the latch cells are the lecture's; the sizes
// (256 x 8) and the split bus are this model's choices.
module sram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned W      = 8
) (
  input  logic              cs_n,
  input  logic              rw,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      din,
  output logic [W-1:0]      dout
);
  logic [W-1:0] mem [1 << ADDR_W];

  // write: the addressed latch is open while cs_n = 0 and rw = 0
  always_latch begin
    if (!cs_n && !rw) mem[addr] = din;
  end

  assign dout = (!cs_n && rw) ? mem[addr] : '0;
endmodule
