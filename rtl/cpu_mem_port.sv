// cpu_mem_port -- the CPU side of the cs / r / ack memory handshake.
//
// A retrieval (state CPU1) drives addr, cs and r and waits for ack; on ack the memory data
// is copied into MDR. A storage (state CPU2) drives data, addr and cs (r = 0) and waits for
// ack. Between accesses the port idles with cs = 0. A new access is started by pulsing
// start with we = 0 (retrieval) or we = 1 (storage); done pulses in the cycle ack is seen,
// and busy is 1 from the cycle after start until then.
// Interface: clk, rst (synchronous, active high), start, we, req_addr, req_data in;
// busy, done, mdr out; bus side: mem_addr, mem_cs, mem_r, mem_wdata out, mem_ack, mem_rdata in.
// Timing: cs, r, addr and data are Moore outputs held until ack; a memory that raises ack
// for one cycle completes the access in that cycle.
// The two waiting states and their outputs are the lecture's; the idle state, the start
// interface and the split data bus are this design's own.
module cpu_mem_port #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned W      = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [W-1:0]      req_data,
  output logic              busy,
  output logic              done,
  output logic [W-1:0]      mdr,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_cs,
  output logic              mem_r,
  output logic [W-1:0]      mem_wdata,
  input  logic              mem_ack,
  input  logic [W-1:0]      mem_rdata
);
  typedef enum logic [1:0] {IDLE, CPU1, CPU2} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      mem_addr  <= '0;
      mem_wdata <= '0;
      mdr       <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          mem_addr  <= req_addr;
          mem_wdata <= req_data;
          state     <= we ? CPU2 : CPU1;
        end
        CPU1: if (mem_ack) begin
          mdr   <= mem_rdata;
          state <= IDLE;
        end
        CPU2: if (mem_ack) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign mem_cs = (state != IDLE);
  assign mem_r  = (state == CPU1);
  assign busy   = (state != IDLE);
  assign done   = busy && mem_ack;
endmodule
