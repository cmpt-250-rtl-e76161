// register_unit -- a word register with parallel load, increment and shift.
//
// All W bits are read in parallel on q. On each rising clock edge the operation op selects
// what the register stores: HOLD keeps it, LOAD takes d, INC adds one (modulo 2^W), SHL
// shifts left bringing sin into bit 0, SHR shifts right bringing sin into bit W-1. rst
// (synchronous, active high) clears it.
// Interface: clk, rst, op, d[W-1:0], sin in; q[W-1:0] out. Timing: one clock per operation.
// The lecture names a register with parallel input/output and "possibly some operational
// capability (such as incrementing or shifting)"; the set of operations, their encoding,
// the width and the reset are this design's own choices.
module register_unit #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   op,
  input  logic [W-1:0] d,
  input  logic         sin,
  output logic [W-1:0] q
);
  localparam logic [2:0] HOLD = 3'd0, LOAD = 3'd1, INC = 3'd2, SHL = 3'd3, SHR = 3'd4;

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      case (op)
        LOAD:    q <= d;
        INC:     q <= q + 1'b1;
        SHL:     q <= {q[W-2:0], sin};
        SHR:     q <= {sin, q[W-1:1]};
        HOLD:    q <= q;
        default: q <= q;
      endcase
    end
  end
endmodule
