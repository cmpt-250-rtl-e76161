// umips_ref.svh -- reference values for the uMIPS controller testbenches, included inside
// a testbench module that imports umips_pkg.
//
// Lists the control points each step of the step-action sequence asserts, written as
// strings of control point names, and turns such a list into a control word. The tests
// compare the controller's output with these words; nothing here is taken from the RTL
// tables.
  typedef enum int {
    R_FETCH1, R_FETCH2, R_ADD, R_SUB, R_AND, R_OR, R_SLT_T, R_SLT_F, R_A1,
    R_L0, R_L1, R_S0, R_S1, R_BEQ_T, R_BEQ_F, R_NONE
  } rstep_e;

  function automatic string points(rstep_e s);
    case (s)
      R_FETCH1: return "lir cs rm spc s1 lpc d";
      R_FETCH2: return "la lb lalu s1 kf";
      R_ADD:    return "lalu s1";
      R_SUB:    return "lalu s1 f0";
      R_AND:    return "lalu s1 f2 f0";
      R_OR:     return "lalu s1 f2 f1";
      R_SLT_T:  return "sin1 sin0 swa w jf";
      R_SLT_F:  return "sin1 swa w jf";
      R_A1:     return "w swa jf";
      R_L0:     return "lalu s1 sop1";
      R_L1:     return "cs rm w sin0 jf";
      R_S0:     return "lalu s1 sop1";
      R_S1:     return "cs jf";
      R_BEQ_T:  return "jf lpc";
      R_BEQ_F:  return "jf";
      default:  return "";
    endcase
  endfunction

  function automatic ctrl_t word_of(string list);
    ctrl_t c;
    string tok;
    c = '0;
    tok = "";
    for (int i = 0; i <= list.len(); i++) begin
      if (i == list.len() || list[i] == " ") begin
        case (tok)
          "lir": c.lir = 1;   "cs": c.cs = 1;     "rm": c.rm = 1;     "spc": c.spc = 1;
          "s1": c.s1 = 1;     "s0": c.s0 = 1;     "lpc": c.lpc = 1;   "d": c.d = 1;
          "la": c.la = 1;     "lb": c.lb = 1;     "lalu": c.lalu = 1; "kf": c.kf = 1;
          "f2": c.f2 = 1;     "f1": c.f1 = 1;     "f0": c.f0 = 1;     "sin1": c.sin1 = 1;
          "sin0": c.sin0 = 1; "swa": c.swa = 1;   "w": c.w = 1;       "jf": c.jf = 1;
          "sop1": c.sop1 = 1; "sop0": c.sop0 = 1;
          default: ;
        endcase
        tok = "";
      end else begin
        tok = {tok, string'(list[i])};
      end
    end
    return c;
  endfunction

  function automatic ctrl_t ref_word(rstep_e s);
    return word_of(points(s));
  endfunction
