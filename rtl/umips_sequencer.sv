// umips_sequencer -- the sequencer of the uMIPS controller.
//
// The machine's control is split into independent two-state diagrams that run side by
// side, one per instruction class, plus the fetch diagram:
//   F1 -> F2 when F        F2 -> F1 always      (fetch)
//   A0 -> A1 when a        A1 -> A0 always      (register-register ALU instructions)
//   L0 -> L1 when b        L1 -> L0 always      (load word)
//   S0 -> S1 when c        S1 -> S0 always      (store word)
// with a = F'*op0*fn42', b = F'*op35, c = F'*op43. The branch instruction needs no state of
// its own: its step is qualified only by F, op4 and the comparator. Each diagram is one
// flip-flop (0 = first state); the eight state lines are decoded one-hot per diagram and
// go to the control point enabler ("one output per state").
//
// Interface: status (opcode, fn-sel, F flag; the comparator lines of the bundle are not used
// here) in; state[7:0] out, indexed by umips_pkg::state_e.
// Timing: state changes on the rising clock edge; rst (synchronous, active high) puts every
// diagram in its first state. Outputs are Moore outputs of the flip-flops.
//
// The diagrams and b, c are the lecture's. The lecture gives a = F'*op0, but its step list
// already ends set-on-less-than (fn42) in A0 (it asserts jf there); taking A1 after that
// would collide with the next fetch, so here fn42 does not enter A1. Reset behaviour is this
// design's own choice.
module umips_sequencer
  import umips_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  status_t             status,
  output logic [N_STATES-1:0] state
);
  logic q_f, q_a, q_l, q_s;   // 0: first state of the diagram, 1: second
  logic a, b, c;

  always_comb begin
    a = !status.f && status.op == OP_RTYPE && status.fn != FN_SLT;
    b = !status.f && status.op == OP_LW;
    c = !status.f && status.op == OP_SW;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_f <= 1'b0;
      q_a <= 1'b0;
      q_l <= 1'b0;
      q_s <= 1'b0;
    end else begin
      q_f <= q_f ? 1'b0 : status.f;
      q_a <= q_a ? 1'b0 : a;
      q_l <= q_l ? 1'b0 : b;
      q_s <= q_s ? 1'b0 : c;
    end
  end

  always_comb begin
    state        = '0;
    state[ST_F1] = !q_f;
    state[ST_F2] =  q_f;
    state[ST_A0] = !q_a;
    state[ST_A1] =  q_a;
    state[ST_L0] = !q_l;
    state[ST_L1] =  q_l;
    state[ST_S0] = !q_s;
    state[ST_S1] =  q_s;
  end

`ifndef SYNTHESIS
  // each diagram is in exactly one of its two states
  always_ff @(posedge clk)
    if (!rst) assert ((state[ST_F1] ^ state[ST_F2]) && (state[ST_A0] ^ state[ST_A1]))
      else $error("umips_sequencer: state lines not one-hot per diagram");
`endif
endmodule
