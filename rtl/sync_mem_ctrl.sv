// sync_mem_ctrl -- a synchronous memory: an asynchronous SRAM behind a clocked controller.
//
// The controller waits in MEM1 while cs = 0. When cs = 1 it performs the access in MEM1:
// for r = 1 the SRAM word at addr is copied into the data register (data <- M[addr]); for
// r = 0 the SRAM is enabled for writing with addr and data (M[addr] <- data). It then goes to
// MEM2, raises ack for that one cycle, and returns to MEM1. rdata holds the word last read
// and is valid while ack is 1.
// Interface: clk, rst (synchronous, active high), cs, r, addr, wdata in; ack, rdata out.
// Timing: an access takes two cycles (MEM1, MEM2), ack in the second. The requester must
// hold cs, r, addr and wdata until it sees ack and drop cs in the cycle after.
// The MEM1/MEM2 chart and the ack handshake are the lecture's. The chart does not show in
// which state ack is raised; raising it in MEM2 is this design's choice, as are the single
// clock shared with the CPU (the lecture allows the memory its own clock period) and the
// sizes.
module sync_mem_ctrl #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned W      = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cs,
  input  logic              r,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      wdata,
  output logic              ack,
  output logic [W-1:0]      rdata
);
  typedef enum logic {MEM1, MEM2} state_e;
  state_e state;

  logic         sram_cs_n;
  logic [W-1:0] sram_dout;

  assign sram_cs_n = !(state == MEM1 && cs);

  sram #(.ADDR_W(ADDR_W), .W(W)) u_sram (
    .cs_n(sram_cs_n), .rw(r), .addr(addr), .din(wdata), .dout(sram_dout));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= MEM1;
      rdata <= '0;
    end else begin
      case (state)
        MEM1: if (cs) begin
          if (r) rdata <= sram_dout;
          state <= MEM2;
        end
        default: state <= MEM1;
      endcase
    end
  end

  assign ack = (state == MEM2);
endmodule
