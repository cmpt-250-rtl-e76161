// dram_array -- behavioural model of a DRAM storage matrix (not synthesizable logic).
//
// 2^ADDR_W words of W bits, organised as rows of ROW_WORDS words; the array is read and
// written a whole row at a time (ROW_WORDS = 1: one word per access). Each bit is a charged
// or discharged capacitor. The model has the two properties a DRAM controller must cope
// with:
//   * a read is destructive: after a row is read (rd = 1 at a clock edge) it no longer
//     holds its value until it is written back;
//   * charge leaks: a row not rewritten for more than RETENTION cycles has lost its value.
// A row that has lost its value reads as 0. lost pulses when such a row, once written, is
// read: it marks a controller failure. Rows never written are free to read.
// Interface: clk, rst, row, rd, wr, wdata in; rdata (combinational, row-selected), lost out.
// Timing: rdata is valid in the cycle rd is asserted; the destruction and any write take
// effect at the rising edge. rd and wr at the same edge: the write wins.
// Destructive read, decay and row-wide access follow the lecture's description of DRAM;
// the sizes, the retention time in cycles and the row-level bookkeeping are this model's.
module dram_array #(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned W         = 16,
  parameter int unsigned ROW_WORDS = 1,
  parameter int unsigned RETENTION = 20000,
  localparam int unsigned COL_W    = $clog2(ROW_WORDS),
  localparam int unsigned ROW_W    = ADDR_W - COL_W,
  localparam int unsigned ROW_BITS = ROW_WORDS * W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [ROW_W-1:0]    row,
  input  logic                rd,
  input  logic                wr,
  input  logic [ROW_BITS-1:0] wdata,
  output logic [ROW_BITS-1:0] rdata,
  output logic                lost
);
  localparam int unsigned ROWS = 1 << ROW_W;

  logic [ROW_BITS-1:0] mem     [ROWS];
  logic [31:0]         written [ROWS];  // cycle of the last write
  logic [ROWS-1:0]     charged;         // holds a value (not destroyed by a read)
  logic [ROWS-1:0]     used;            // has ever been written
  logic [31:0]         now;
  logic                intact;

  assign intact = charged[row] && (now - written[row] <= RETENTION);
  assign rdata  = intact ? mem[row] : '0;
  assign lost   = rd && !wr && used[row] && !intact;

  always_ff @(posedge clk) begin
    if (rst) begin
      now     <= '0;
      charged <= '0;
      used    <= '0;
    end else begin
      now <= now + 1;
      if (wr) begin
        mem[row]     <= wdata;
        written[row] <= now;
        charged[row] <= 1'b1;
        used[row]    <= 1'b1;
      end else if (rd) begin
        charged[row] <= 1'b0;
      end
    end
  end
endmodule
