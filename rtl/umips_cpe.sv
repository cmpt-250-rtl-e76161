// umips_cpe -- control point enabler of the uMIPS controller (PLA + micro-instruction ROM).
//
// Every line of the step-action sequence is a product term of state lines and status
// lines. A PLA evaluates the 15 product terms and its OR plane encodes the one that is
// true into a 4-bit micro-instruction address (step k -> address k+1; no true step ->
// address 0). A ROM, built as a PLD whose OR plane holds the function table, returns the
// 22-bit micro-instruction stored at that address: one bit per datapath control point.
//
//   F1*F                  lir cs rm spc s1 lpc d     A1         w swa jf
//   F2                    la lb lalu s1 kf           L0*F'*op35 lalu s1 sop1
//   A0*F'*op0*fn32        lalu s1                    L1         cs rm w sin0 jf
//   A0*F'*op0*fn34        lalu s1 f0                 S0*F'*op43 lalu s1 sop1
//   A0*F'*op0*fn36        lalu s1 f2 f0              S1         cs jf
//   A0*F'*op0*fn37        lalu s1 f2 f1              F'*op4*aeqb   jf lpc
//   A0*F'*op0*fn42*altb   sin1 sin0 swa w jf         F'*op4*aeqb'  jf
//   A0*F'*op0*fn42*altb'  sin1 swa w jf
//
// Interface: state[7:0] from the sequencer and the status bundle in; ctrl (umips_pkg::ctrl_t),
// the micro-instruction address and the 15 product lines (one per step) out. Timing: combinational.
//
// The step-action sequence and the PLA-selects-ROM-word structure are the lecture's. The
// address assignment and the bit order of the micro-instruction are this design's; s0 and
// sop0 are the two control points that no step asserts. The encoding needs at most one
// step true at a time; the sequencer guarantees that, and umips_controller asserts it on
// the product lines brought out on step.
module umips_cpe
  import umips_pkg::*;
(
  input  logic [N_STATES-1:0] state,
  input  status_t             status,
  output logic [N_STEPS-1:0]  step,
  output logic [UADDR_W-1:0]  uaddr,
  output ctrl_t               ctrl
);
  localparam logic [N_STEPS-1:0][PLA_IN-1:0] AND_T = pla_and_t();
  localparam logic [N_STEPS-1:0][PLA_IN-1:0] AND_C = pla_and_c();
  localparam logic [UADDR_W-1:0][N_STEPS-1:0] OR_M = pla_or();
  localparam logic [(1<<UADDR_W)-1:0][CTRL_W-1:0] UROM = urom_contents();

  logic [CTRL_W-1:0]  uword;

  pla #(.N_IN(PLA_IN), .N_PROD(N_STEPS), .N_OUT(UADDR_W),
        .AND_T(AND_T), .AND_C(AND_C), .OR_M(OR_M))
    u_pla (.in({state, status}), .prod(step), .out(uaddr));

  pld_rom #(.N_IN(UADDR_W), .N_OUT(CTRL_W), .CONTENTS(UROM))
    u_rom (.addr(uaddr), .data(uword));

  assign ctrl = ctrl_t'(uword);

endmodule
