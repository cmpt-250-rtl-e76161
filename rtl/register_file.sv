// register_file -- a set of addressable registers with one read and one write port.
//
// N_REGS registers of W bits, with a read control point and a write control point. The
// read port is combinational: with re = 1, rdata = reg[raddr]; with re = 0 it is 0. The
// write port stores wdata into reg[waddr] on a rising clock edge when we is 1. Reading and
// writing happen in the same cycle; a read of the register being written returns the old
// value until the edge. Contents are cleared by rst (synchronous, active high).
// Interface: clk, rst, we, waddr, wdata, re, raddr in; rdata out.
// Addressed registers with simultaneous read and write are the lecture's; the port count,
// the sizes (32 x 32, as for a MIPS-style machine) and the reset are this design's.
module register_file #(
  parameter int unsigned N_REGS = 32,
  parameter int unsigned W      = 32,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] regs [N_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = re ? regs[raddr] : '0;
endmodule
