// umips_cpe_tb -- the control point enabler against the step-action reference.
// Random state lines and status are drawn from the combinations the sequencer produces
// (fetch: F = 1 with the instruction diagrams in their first states; execute: F = 0, F1,
// and at most one instruction diagram in its second state). The expected step is decoded
// here from the step conditions and its control word taken from umips_ref_pkg. Every step
// must occur.
module umips_cpe_tb;
  import umips_pkg::*;
  `include "umips_ref.svh"
  int checks = 0, failures = 0;
  int seen [16];
  logic [N_STATES-1:0] state;
  status_t st;
  logic [N_STEPS-1:0] step;
  logic [UADDR_W-1:0] uaddr;
  ctrl_t ctrl;

  umips_cpe dut (.state(state), .status(st), .step(step), .uaddr(uaddr), .ctrl(ctrl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rstep_e expected(logic qf, logic qa, logic ql, logic qs, status_t s);
    if (!qf && s.f) return R_FETCH1;
    if (qf) return R_FETCH2;
    if (qa) return R_A1;
    if (ql) return R_L1;
    if (qs) return R_S1;
    if (s.f) return R_NONE;
    case (s.op)
      6'd0: case (s.fn)
              6'd32: return R_ADD;
              6'd34: return R_SUB;
              6'd36: return R_AND;
              6'd37: return R_OR;
              6'd42: return s.altb ? R_SLT_T : R_SLT_F;
              default: return R_NONE;
            endcase
      6'd35: return R_L0;
      6'd43: return R_S0;
      6'd4:  return s.aeqb ? R_BEQ_T : R_BEQ_F;
      default: return R_NONE;
    endcase
  endfunction

  initial begin
    logic [5:0] ops [5] = '{6'd0, 6'd4, 6'd35, 6'd43, 6'd2};
    logic [5:0] fns [6] = '{6'd32, 6'd34, 6'd36, 6'd37, 6'd42, 6'd33};
    logic qf, qa, ql, qs;
    rstep_e e;
    for (int i = 0; i < 20000; i++) begin
      st.op = ops[$urandom_range(0, 4)]; st.fn = fns[$urandom_range(0, 5)];
      st.altb = 1'($urandom); st.aeqb = 1'($urandom);
      {qa, ql, qs} = '0;
      if ($urandom_range(0, 2) == 0) begin
        st.f = 1; qf = 1'($urandom);
      end else begin
        st.f = 0; qf = 0;
        case ($urandom_range(0, 3))
          1: begin qa = 1; st.op = 0; end
          2: begin ql = 1; st.op = 35; end
          3: begin qs = 1; st.op = 43; end
          default: ;
        endcase
      end
      state = {qs, !qs, ql, !ql, qa, !qa, qf, !qf};
      #1;
      e = expected(qf, qa, ql, qs, st);
      seen[e]++;
      checks++;
      if (!$onehot0(step)) begin failures++; $display("FAIL two steps at once"); end
      checks++;
      if (ctrl !== ref_word(e)) begin
        failures++;
        $display("FAIL step %s: ctrl=%b exp=%b", e.name(), ctrl, ref_word(e));
      end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL step %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
