// umips_controller_tb -- runs an instruction stream through the uMIPS controller.
//
// The test stands in for the datapath: an instruction register loaded when lir is
// asserted, the F flag (set to 1 at reset, set by jf, cleared by kf) and random comparator
// outputs. For each instruction it expects, cycle by cycle, the control words of the
// fetch steps followed by the instruction's own steps:
//   add/sub/and/or: F1*F, F2, A0, A1   (4 cycles)     lw: F1*F, F2, L0, L1   (4 cycles)
//   slt:            F1*F, F2, A0       (3 cycles)     sw: F1*F, F2, S0, S1   (4 cycles)
//   beq:            F1*F, F2, branch   (3 cycles)
// Every kind of step must occur at least once.
module umips_controller_tb;
  import umips_pkg::*;
  `include "umips_ref.svh"
  int checks = 0, failures = 0;
  int seen [16];
  logic clk = 0, rst;
  status_t st;
  ctrl_t ctrl;
  logic [N_STATES-1:0] state;
  logic [UADDR_W-1:0] uaddr;
  logic f_flag;
  logic [11:0] ir, next_ir;   // {op, fn}

  umips_controller dut (.clk(clk), .rst(rst), .status(st), .ctrl(ctrl), .state(state),
                        .uaddr(uaddr));
  always #5 clk = ~clk;

  // datapath stand-in
  always_ff @(posedge clk) begin
    if (rst) f_flag <= 1'b1;
    else if (ctrl.jf) f_flag <= 1'b1;
    else if (ctrl.kf) f_flag <= 1'b0;
    if (!rst && ctrl.lir) ir <= next_ir;
  end
  always_comb begin
    st.op = ir[11:6];
    st.fn = ir[5:0];
    st.f  = f_flag;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_step(rstep_e e);
    #1;
    seen[e]++;
    checks++;
    if (ctrl !== ref_word(e)) begin
      failures++;
      $display("FAIL %s: ctrl=%b exp=%b", e.name(), ctrl, ref_word(e));
    end
    @(posedge clk);
  endtask

  initial begin
    logic [5:0] fns [5] = '{6'd32, 6'd34, 6'd36, 6'd37, 6'd42};
    int kind;
    logic lt, eq;
    rst = 1; ir = '0; next_ir = '0; st.altb = 0; st.aeqb = 0;
    @(posedge clk); #1 rst = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      kind = $urandom_range(0, 3);
      case (kind)
        0: next_ir = {6'd0, fns[$urandom_range(0, 4)]};
        1: next_ir = {6'd35, 6'($urandom)};
        2: next_ir = {6'd43, 6'($urandom)};
        default: next_ir = {6'd4, 6'($urandom)};
      endcase
      lt = 1'($urandom); eq = 1'($urandom);
      st.altb = lt; st.aeqb = eq;
      expect_step(R_FETCH1);
      expect_step(R_FETCH2);
      case (next_ir[11:6])
        6'd0: case (next_ir[5:0])
          6'd32: begin expect_step(R_ADD); expect_step(R_A1); end
          6'd34: begin expect_step(R_SUB); expect_step(R_A1); end
          6'd36: begin expect_step(R_AND); expect_step(R_A1); end
          6'd37: begin expect_step(R_OR);  expect_step(R_A1); end
          default: expect_step(lt ? R_SLT_T : R_SLT_F);
        endcase
        6'd35: begin expect_step(R_L0); expect_step(R_L1); end
        6'd43: begin expect_step(R_S0); expect_step(R_S1); end
        default: expect_step(eq ? R_BEQ_T : R_BEQ_F);
      endcase
    end
    for (int k = 0; k < 15; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL step %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
