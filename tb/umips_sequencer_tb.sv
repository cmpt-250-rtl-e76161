// umips_sequencer_tb -- random F flag, opcode and fn-sel against a reference model of the
// four two-state diagrams (F1/F2 on F; A0/A1 on F'*op0 except set-on-less-than; L0/L1 on
// F'*op35; S0/S1 on F'*op43; each second state returns unconditionally). Every transition
// must be taken at least once.
module umips_sequencer_tb;
  import umips_pkg::*;
  int checks = 0, failures = 0;
  int taken [4];
  logic clk = 0, rst;
  status_t st;
  logic [N_STATES-1:0] state;
  logic [3:0] q;   // reference: {S, L, A, F}, 1 = second state

  umips_sequencer dut (.clk(clk), .rst(rst), .status(st), .state(state));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_lines(logic [3:0] m);
    return {m[3], !m[3], m[2], !m[2], m[1], !m[1], m[0], !m[0]};
  endfunction

  initial begin
    logic [5:0] ops [5] = '{6'd0, 6'd4, 6'd35, 6'd43, 6'd17};
    logic [5:0] fns [6] = '{6'd32, 6'd34, 6'd36, 6'd37, 6'd42, 6'd9};
    logic a, b, c;
    rst = 1; st = '0; q = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      st.f = 1'($urandom); st.op = ops[$urandom_range(0, 4)]; st.fn = fns[$urandom_range(0, 5)];
      st.altb = 1'($urandom); st.aeqb = 1'($urandom);
      #1;
      checks++;
      if (state !== expect_lines(q)) begin
        failures++;
        $display("FAIL state=%b exp=%b", state, expect_lines(q));
      end
      a = !st.f && st.op == 0 && st.fn != 42;
      b = !st.f && st.op == 35;
      c = !st.f && st.op == 43;
      @(posedge clk);
      if (!q[0] && st.f) taken[0]++;
      if (!q[1] && a) taken[1]++;
      if (!q[2] && b) taken[2]++;
      if (!q[3] && c) taken[3]++;
      q = {q[3] ? 1'b0 : c, q[2] ? 1'b0 : b, q[1] ? 1'b0 : a, q[0] ? 1'b0 : st.f};
      #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (taken[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
