// umips_pkg -- shared types and constants of the uMIPS controller.
//
// Holds the opcode and function-select values the controller decodes, the one-hot
// numbering of the eight sequencer states, the 22-bit micro-instruction (one bit per
// datapath control point), the status bundle the datapath reports, and constant functions
// that build the personality of the controller's PLA and the contents of its
// micro-instruction ROM from the step-action sequence.
//
// The control point names, the state names and the step-action sequence are the
// lecture's. The opcode/function values are the standard MIPS encodings the names op0,
// op4, op35, op43, fn32..fn42 refer to. The bit order of the micro-instruction, the
// ROM address assigned to each step and the PLA input order are this design's own.
package umips_pkg;

  localparam int unsigned OP_W = 6;
  localparam int unsigned FN_W = 6;

  localparam logic [OP_W-1:0] OP_RTYPE = 6'd0;   // op0
  localparam logic [OP_W-1:0] OP_BEQ   = 6'd4;   // op4
  localparam logic [OP_W-1:0] OP_LW    = 6'd35;  // op35
  localparam logic [OP_W-1:0] OP_SW    = 6'd43;  // op43
  localparam logic [FN_W-1:0] FN_ADD   = 6'd32;
  localparam logic [FN_W-1:0] FN_SUB   = 6'd34;
  localparam logic [FN_W-1:0] FN_AND   = 6'd36;
  localparam logic [FN_W-1:0] FN_OR    = 6'd37;
  localparam logic [FN_W-1:0] FN_SLT   = 6'd42;

  // one output line per sequencer state
  typedef enum int unsigned {
    ST_F1 = 0, ST_F2 = 1, ST_A0 = 2, ST_A1 = 3,
    ST_L0 = 4, ST_L1 = 5, ST_S0 = 6, ST_S1 = 7
  } state_e;
  localparam int unsigned N_STATES = 8;

  // status lines from the datapath
  typedef struct packed {
    logic [OP_W-1:0] op;    // opcode field of the instruction register
    logic [FN_W-1:0] fn;    // fn-sel field of the instruction register
    logic            altb;  // comparator: A < B
    logic            aeqb;  // comparator: A == B
    logic            f;     // F flag (1: fetch the next instruction)
  } status_t;
  localparam int unsigned N_STATUS = $bits(status_t);

  // one micro-instruction: every datapath control point
  typedef struct packed {
    logic lir, cs, rm, spc, s1, s0, lpc, d, la, lb, lalu, kf;
    logic f2, f1, f0, sin1, sin0, swa, w, jf, sop1, sop0;
  } ctrl_t;
  localparam int unsigned CTRL_W = $bits(ctrl_t);

  // PLA: inputs {state lines, status}, one product per step, ROM address out
  localparam int unsigned N_STEPS = 15;
  localparam int unsigned UADDR_W = 4;
  localparam int unsigned PLA_IN  = N_STATES + N_STATUS;
  localparam int unsigned IN_F    = 0;
  localparam int unsigned IN_AEQB = 1;
  localparam int unsigned IN_ALTB = 2;
  localparam int unsigned IN_FN   = 3;
  localparam int unsigned IN_OP   = IN_FN + FN_W;
  localparam int unsigned IN_ST   = IN_OP + OP_W;

  typedef struct packed {
    logic [PLA_IN-1:0] t;  // true literals kept
    logic [PLA_IN-1:0] c;  // complemented literals kept
  } term_t;

  // Build one product term. -1 means "literal not used".
  function automatic term_t mk_term(int st, int f, int op, int fn, int lt, int eq);
    term_t r;
    r = '0;
    if (st >= 0) r.t[IN_ST + st] = 1'b1;
    if (f == 1) r.t[IN_F] = 1'b1;
    if (f == 0) r.c[IN_F] = 1'b1;
    if (lt == 1) r.t[IN_ALTB] = 1'b1;
    if (lt == 0) r.c[IN_ALTB] = 1'b1;
    if (eq == 1) r.t[IN_AEQB] = 1'b1;
    if (eq == 0) r.c[IN_AEQB] = 1'b1;
    if (op >= 0)
      for (int b = 0; b < OP_W; b++)
        if (op[b]) r.t[IN_OP + b] = 1'b1; else r.c[IN_OP + b] = 1'b1;
    if (fn >= 0)
      for (int b = 0; b < FN_W; b++)
        if (fn[b]) r.t[IN_FN + b] = 1'b1; else r.c[IN_FN + b] = 1'b1;
    return r;
  endfunction

  // Boolean control expression of step k (k = 0 .. N_STEPS-1); step k lives at ROM word k+1.
  function automatic term_t step_term(int k);
    case (k)
      0:  return mk_term(ST_F1, 1, -1, -1, -1, -1);        // F1*F
      1:  return mk_term(ST_F2, -1, -1, -1, -1, -1);       // F2
      2:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_ADD), -1, -1);         // A0*F'*op0*fn32
      3:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_SUB), -1, -1);         // A0*F'*op0*fn34
      4:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_AND), -1, -1);         // A0*F'*op0*fn36
      5:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_OR), -1, -1);         // A0*F'*op0*fn37
      6:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_SLT), 1, -1);          // A0*F'*op0*fn42*altb
      7:  return mk_term(ST_A0, 0, int'(OP_RTYPE), int'(FN_SLT), 0, -1);          // A0*F'*op0*fn42*altb'
      8:  return mk_term(ST_A1, -1, -1, -1, -1, -1);       // A1
      9:  return mk_term(ST_L0, 0, int'(OP_LW), -1, -1, -1);        // L0*F'*op35
      10: return mk_term(ST_L1, -1, -1, -1, -1, -1);       // L1
      11: return mk_term(ST_S0, 0, int'(OP_SW), -1, -1, -1);        // S0*F'*op43
      12: return mk_term(ST_S1, -1, -1, -1, -1, -1);       // S1
      13: return mk_term(-1, 0, int'(OP_BEQ), -1, -1, 1);             // F'*op4*aeqb
      default: return mk_term(-1, 0, int'(OP_BEQ), -1, -1, 0);       // F'*op4*aeqb'
    endcase
  endfunction

  // Control points asserted by step k.
  function automatic ctrl_t step_action(int k);
    ctrl_t c;
    c = '0;
    case (k)
      0:  begin c.lir = 1; c.cs = 1; c.rm = 1; c.spc = 1; c.s1 = 1; c.lpc = 1; c.d = 1; end
      1:  begin c.la = 1; c.lb = 1; c.lalu = 1; c.s1 = 1; c.kf = 1; end
      2:  begin c.lalu = 1; c.s1 = 1; end
      3:  begin c.lalu = 1; c.s1 = 1; c.f0 = 1; end
      4:  begin c.lalu = 1; c.s1 = 1; c.f2 = 1; c.f0 = 1; end
      5:  begin c.lalu = 1; c.s1 = 1; c.f2 = 1; c.f1 = 1; end
      6:  begin c.sin1 = 1; c.sin0 = 1; c.swa = 1; c.w = 1; c.jf = 1; end
      7:  begin c.sin1 = 1; c.swa = 1; c.w = 1; c.jf = 1; end
      8:  begin c.w = 1; c.swa = 1; c.jf = 1; end
      9:  begin c.lalu = 1; c.s1 = 1; c.sop1 = 1; end
      10: begin c.cs = 1; c.rm = 1; c.w = 1; c.sin0 = 1; c.jf = 1; end
      11: begin c.lalu = 1; c.s1 = 1; c.sop1 = 1; end
      12: begin c.cs = 1; c.jf = 1; end
      13: begin c.jf = 1; c.lpc = 1; end
      default: begin c.jf = 1; end
    endcase
    return c;
  endfunction

  function automatic logic [N_STEPS-1:0][PLA_IN-1:0] pla_and_t();
    logic [N_STEPS-1:0][PLA_IN-1:0] r;
    for (int k = 0; k < N_STEPS; k++) r[k] = step_term(k).t;
    return r;
  endfunction

  function automatic logic [N_STEPS-1:0][PLA_IN-1:0] pla_and_c();
    logic [N_STEPS-1:0][PLA_IN-1:0] r;
    for (int k = 0; k < N_STEPS; k++) r[k] = step_term(k).c;
    return r;
  endfunction

  // OR plane: product k drives the address bits of k+1
  function automatic logic [UADDR_W-1:0][N_STEPS-1:0] pla_or();
    logic [UADDR_W-1:0][N_STEPS-1:0] r;
    for (int b = 0; b < UADDR_W; b++)
      for (int k = 0; k < N_STEPS; k++)
        r[b][k] = 1'(((k + 1) >> b) & 1);
    return r;
  endfunction

  // ROM: word 0 is the idle word (no control point), word k+1 holds step k
  function automatic logic [(1<<UADDR_W)-1:0][CTRL_W-1:0] urom_contents();
    logic [(1<<UADDR_W)-1:0][CTRL_W-1:0] r;
    r = '0;
    for (int k = 0; k < N_STEPS; k++) r[k+1] = step_action(k);
    return r;
  endfunction

endpackage
