// dram_ctrl -- DRAM controller: request handling with write-back, and refresh by counter.
//
// The controller owns a buffer register DR, a row register ROW and a refresh counter CTR,
// and follows this state chart:
//   M0  cs = 0: DR <- M[CTR], go to M1          cs = 1: ROW <- addr, go to M2
//   M1  M[CTR] <- DR, CTR <- CTR + 1, go to M0  (refresh)
//   M2  r/w' = 0: DR <- data   r/w' = 1: DR <- M[ROW], go to M3
//   M3  M[ROW] <- DR, data <- DR, ack, go to M4 (write the new value, or restore the read one)
//   M4  DR <- M[CTR], go to M1
// With no request the controller sweeps the array, reading each location into DR and
// writing it back. A request's word passes through DR too, so a destructive read is always
// written back; and every request is followed by one refresh before the next request is
// accepted, so the refresh sweep cannot be locked out by a run of requests.
//
// ROW_WORDS > 1 selects the row-wide organisation: DR holds a whole row of ROW_WORDS words,
// every array access (and so every refresh step) covers a row, CTR counts rows, and a
// column select picks the requested word out of DR. A write then reads the row into DR
// and replaces one word (M2: DR <- M[ROW] with the word at the column set to data), since
// the other words of the row must be written back too. ROW_WORDS = 1 is the chart above
// exactly.
// Interface: clk, rst (synchronous, active high); requester side cs, rw (1 read, 0 write),
// addr, wdata in, ack, rdata out; array side arr_row, arr_rd, arr_wr, arr_wdata out,
// arr_rdata in (combinational row read, destructive at the clock edge).
// Timing: a request seen in M0 is acknowledged two cycles later (M2, then M3 with ack);
// then M4 and M1 follow before the next request is seen, 5 cycles per request in a
// back-to-back stream. rdata is the requested word of DR, valid while ack is 1. The
// requester holds its signals until ack.
// The chart and the row-wide variant are the lecture's; the sizes, the default of one word
// per row, the split data bus and the reset are this design's.
module dram_ctrl #(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned W         = 16,
  parameter int unsigned ROW_WORDS = 1,
  localparam int unsigned COL_W    = $clog2(ROW_WORDS),
  localparam int unsigned ROW_W    = ADDR_W - COL_W,
  localparam int unsigned ROW_BITS = ROW_WORDS * W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                cs,
  input  logic                rw,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [W-1:0]        wdata,
  output logic                ack,
  output logic [W-1:0]        rdata,
  output logic [ROW_W-1:0]    arr_row,
  output logic                arr_rd,
  output logic                arr_wr,
  output logic [ROW_BITS-1:0] arr_wdata,
  input  logic [ROW_BITS-1:0] arr_rdata
);
  typedef enum logic [2:0] {M0, M1, M2, M3, M4} state_e;
  state_e              state;
  logic [ROW_BITS-1:0] dr;
  logic [ADDR_W-1:0]   row;    // requested address: row and column
  logic [ROW_W-1:0]    ctr;
  logic [ROW_W-1:0]    row_sel;
  logic [COL_W:0]      col;    // one spare bit so that ROW_WORDS = 1 needs no zero-width select
  logic [ROW_BITS-1:0] merged; // DR contents for a write request

  assign row_sel = row[ADDR_W-1 -: ROW_W];
  assign col     = (ROW_WORDS > 1) ? (COL_W+1)'(row) & (COL_W+1)'(ROW_WORDS - 1) : '0;

  always_comb begin
    merged = arr_rdata;
    merged[col*W +: W] = wdata;
  end

  // array port
  always_comb begin
    arr_row = ctr;
    arr_rd  = 1'b0;
    arr_wr  = 1'b0;
    case (state)
      M0: arr_rd = !cs;
      M1: arr_wr = 1'b1;
      M2: begin arr_row = row_sel; arr_rd = rw || (ROW_WORDS > 1); end
      M3: begin arr_row = row_sel; arr_wr = 1'b1; end
      M4: arr_rd = 1'b1;
      default: ;
    endcase
  end
  assign arr_wdata = dr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M0;
      dr    <= '0;
      row   <= '0;
      ctr   <= '0;
    end else begin
      case (state)
        M0: if (cs) begin
          row   <= addr;
          state <= M2;
        end else begin
          dr    <= arr_rdata;
          state <= M1;
        end
        M1: begin
          ctr   <= ctr + 1'b1;
          state <= M0;
        end
        M2: begin
          if (rw)                  dr <= arr_rdata;
          else if (ROW_WORDS == 1) dr <= ROW_BITS'(wdata);
          else                     dr <= merged;
          state <= M3;
        end
        M3: state <= M4;
        M4: begin
          dr    <= arr_rdata;
          state <= M1;
        end
        default: state <= M0;
      endcase
    end
  end

  assign ack   = (state == M3);
  assign rdata = dr[col*W +: W];
endmodule
