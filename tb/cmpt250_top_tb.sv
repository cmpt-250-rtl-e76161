// cmpt250_top_tb -- end-to-end test of every part of cmpt250_top at its default sizes.
//
//  * uMIPS controller: an instruction stream (add, sub, and, or, slt, lw, sw, beq) with a
//    stand-in instruction register and F flag; the control word of every cycle is compared
//    with the step-action reference, and every step must occur.
//  * PLA and PAL: the worked example for all eight inputs against its equations.
//  * flip-flop, register (load / increment / shift left / shift right / hold) and register
//    file (including reads of a register written in the same cycle) against references.
//  * SRAM memory: random retrievals and storages through the CPU port and the clocked
//    controller, against a reference array.
//  * DRAM memory: every word written, then random traffic with back-to-back requests and
//    idle stretches longer than the retention time; reads are checked, no word may be lost,
//    and refresh write-backs are counted.
// Each mechanism is counted; one that never happened counts as a failure.
module cmpt250_top_tb;
  import umips_pkg::*;
  `include "umips_ref.svh"

  localparam int SM_AW = 8, SM_W = 8, DM_AW = 8, DM_W = 16, RET = 20000;

  int checks = 0, failures = 0;
  int seen [16];
  int n_sm_rd = 0, n_sm_wr = 0, n_dm_rd = 0, n_dm_wr = 0, n_b2b = 0, n_idle = 0;
  int n_refresh = 0, n_rf_same = 0, n_ff_hold = 0, n_ff_load = 0;
  int n_reg [5];

  logic clk = 0, rst;
  status_t umips_status;
  ctrl_t umips_ctrl;
  logic [N_STATES-1:0] umips_state;
  logic [UADDR_W-1:0] umips_uaddr;
  logic [2:0] xyz, pla_f, pal_f;
  logic ff_en, ff_d, ff_q;
  logic [2:0] reg_op;
  logic [7:0] reg_d, reg_q;
  logic reg_sin;
  logic rf_we, rf_re;
  logic [4:0] rf_waddr, rf_raddr;
  logic [31:0] rf_wdata, rf_rdata;
  logic sm_start, sm_we, sm_busy, sm_done;
  logic [SM_AW-1:0] sm_addr;
  logic [SM_W-1:0] sm_data, sm_mdr;
  logic dm_start, dm_we, dm_busy, dm_done, dm_lost;
  logic [DM_AW-1:0] dm_addr;
  logic [DM_W-1:0] dm_data, dm_mdr;

  cmpt250_top dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: uMIPS=%0d SRAM=%0d DRAM=%0d", seen[0], n_sm_rd + n_sm_wr, n_dm_rd + n_dm_wr);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ uMIPS datapath stand-in
  logic f_flag;
  logic [11:0] ir, next_ir;
  always_ff @(posedge clk) begin
    if (rst) f_flag <= 1'b1;
    else if (umips_ctrl.jf) f_flag <= 1'b1;
    else if (umips_ctrl.kf) f_flag <= 1'b0;
    if (!rst && umips_ctrl.lir) ir <= next_ir;
  end
  always_comb begin
    umips_status.op = ir[11:6];
    umips_status.fn = ir[5:0];
    umips_status.f  = f_flag;
  end

  task automatic step(rstep_e e);
    #1;
    seen[e]++;
    chk(umips_ctrl === ref_word(e), $sformatf("uMIPS step %s", e.name()));
    @(posedge clk);
  endtask

  // DRAM refresh write-backs and losses
  always @(posedge clk) begin
    if (!rst && dut.u_dm_ctrl.arr_wr && !dut.u_dm_ctrl.ack) n_refresh++;
    if (!rst && dm_lost) begin failures++; $display("FAIL DRAM word lost"); end
  end

  initial begin
    logic [5:0] fns [5] = '{6'd32, 6'd34, 6'd36, 6'd37, 6'd42};
    logic [SM_W-1:0] sm_model [1 << SM_AW];
    logic [DM_W-1:0] dm_model [1 << DM_AW];
    logic [31:0] rf_model [32];
    logic [7:0] reg_model;
    logic ff_model, lt, eq, x, y, z;
    logic [2:0] e;

    rst = 1; ir = '0; next_ir = '0; umips_status.altb = 0; umips_status.aeqb = 0;
    xyz = 0; ff_en = 0; ff_d = 0; reg_op = 0; reg_d = 0; reg_sin = 0;
    rf_we = 0; rf_re = 1; rf_waddr = 0; rf_raddr = 0; rf_wdata = 0;
    sm_start = 0; sm_we = 0; sm_addr = 0; sm_data = 0;
    dm_start = 0; dm_we = 0; dm_addr = 0; dm_data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(negedge clk);

    // ---------------- uMIPS controller
    for (int i = 0; i < 500; i++) begin
      case ($urandom_range(0, 3))
        0: next_ir = {6'd0, fns[$urandom_range(0, 4)]};
        1: next_ir = {6'd35, 6'($urandom)};
        2: next_ir = {6'd43, 6'($urandom)};
        default: next_ir = {6'd4, 6'($urandom)};
      endcase
      lt = 1'($urandom); eq = 1'($urandom);
      umips_status.altb = lt; umips_status.aeqb = eq;
      step(R_FETCH1);
      step(R_FETCH2);
      case (next_ir[11:6])
        6'd0: case (next_ir[5:0])
          6'd32: begin step(R_ADD); step(R_A1); end
          6'd34: begin step(R_SUB); step(R_A1); end
          6'd36: begin step(R_AND); step(R_A1); end
          6'd37: begin step(R_OR);  step(R_A1); end
          default: step(lt ? R_SLT_T : R_SLT_F);
        endcase
        6'd35: begin step(R_L0); step(R_L1); end
        6'd43: begin step(R_S0); step(R_S1); end
        default: step(eq ? R_BEQ_T : R_BEQ_F);
      endcase
    end
    for (int k = 0; k < 15; k++) chk(seen[k] > 0, $sformatf("uMIPS step %0d occurred", k));

    // ---------------- PLA / PAL example
    for (int v = 0; v < 8; v++) begin
      xyz = 3'(v); #1;
      {x, y, z} = xyz;
      e = {(x & y) | (!x & !y & !z) | (!y & z), z, (x & y) | z};
      chk(pla_f === e, "PLA example");
      chk(pal_f === e, "PAL example");
    end

    // ---------------- flip-flop, register, register file
    @(negedge clk);
    ff_model = 0; reg_model = 0;
    for (int i = 0; i < 32; i++) rf_model[i] = 0;
    for (int i = 0; i < 500; i++) begin
      ff_en = 1'($urandom); ff_d = 1'($urandom);
      reg_op = 3'($urandom_range(0, 4)); reg_d = 8'($urandom); reg_sin = 1'($urandom);
      rf_we = 1'($urandom); rf_waddr = 5'($urandom); rf_wdata = $urandom;
      rf_raddr = (i % 3 == 0) ? rf_waddr : 5'($urandom);
      #1;
      rf_re = (i % 8 != 7);
      #1;
      chk(rf_rdata === (rf_re ? rf_model[rf_raddr] : 32'h0), "register file read");
      if (rf_we && rf_raddr == rf_waddr) n_rf_same++;
      if (ff_en) n_ff_load++; else n_ff_hold++;
      n_reg[reg_op]++;
      @(posedge clk);
      if (ff_en) ff_model = ff_d;
      case (reg_op)
        1: reg_model = reg_d;
        2: reg_model = reg_model + 1;
        3: reg_model = {reg_model[6:0], reg_sin};
        4: reg_model = {reg_sin, reg_model[7:1]};
        default: ;
      endcase
      if (rf_we) rf_model[rf_waddr] = rf_wdata;
      #1;
      chk(ff_q === ff_model, "flip-flop");
      chk(reg_q === reg_model, "register");
      @(negedge clk);
    end
    chk(n_ff_hold > 0 && n_ff_load > 0, "flip-flop hold and load");
    for (int k = 0; k < 5; k++) chk(n_reg[k] > 0, $sformatf("register operation %0d", k));
    chk(n_rf_same > 0, "register file read and write of one register in one cycle");

    // ---------------- SRAM memory through the CPU port
    for (int i = 0; i < (1 << SM_AW); i++) begin
      sm_start = 1; sm_we = 1; sm_addr = SM_AW'(i); sm_data = SM_W'($urandom);
      sm_model[i] = sm_data;
      @(negedge clk); sm_start = 0;
      while (!sm_done) @(negedge clk);
      @(negedge clk);
      n_sm_wr++;
    end
    for (int i = 0; i < 600; i++) begin
      sm_start = 1; sm_we = 1'($urandom); sm_addr = SM_AW'($urandom); sm_data = SM_W'($urandom);
      @(negedge clk); sm_start = 0;
      while (!sm_done) @(negedge clk);
      @(negedge clk);
      if (sm_we) begin sm_model[sm_addr] = sm_data; n_sm_wr++; end
      else begin n_sm_rd++; chk(sm_mdr === sm_model[sm_addr], "SRAM read"); end
    end
    chk(n_sm_rd > 0 && n_sm_wr > 0, "SRAM reads and writes");

    // ---------------- DRAM memory through the CPU port
    for (int i = 0; i < (1 << DM_AW); i++) begin
      dm_start = 1; dm_we = 1; dm_addr = DM_AW'(i); dm_data = DM_W'($urandom);
      dm_model[i] = dm_data;
      @(negedge clk); dm_start = 0;
      while (!dm_done) @(negedge clk);
      @(negedge clk);
      n_dm_wr++;
    end
    for (int i = 0; i < 3000; i++) begin
      int gap;
      gap = (i % 1000 == 500) ? RET + 1000 : $urandom_range(0, 2);
      if (gap == 0) n_b2b++;
      if (gap > RET) n_idle++;
      repeat (gap) @(negedge clk);
      dm_start = 1; dm_we = 1'($urandom); dm_addr = DM_AW'($urandom); dm_data = DM_W'($urandom);
      @(negedge clk); dm_start = 0;
      while (!dm_done) @(negedge clk);
      @(negedge clk);
      if (dm_we) begin dm_model[dm_addr] = dm_data; n_dm_wr++; end
      else begin
        n_dm_rd++;
        chk(dm_mdr === dm_model[dm_addr], "DRAM read");
      end
    end
    // a final idle stretch past the retention time, then every word is read back
    repeat (RET + 1000) @(negedge clk);
    n_idle++;
    for (int i = 0; i < (1 << DM_AW); i++) begin
      dm_start = 1; dm_we = 0; dm_addr = DM_AW'(i);
      @(negedge clk); dm_start = 0;
      while (!dm_done) @(negedge clk);
      @(negedge clk);
      n_dm_rd++;
      chk(dm_mdr === dm_model[i], "DRAM final read");
    end
    chk(n_dm_rd > 0 && n_dm_wr > 0, "DRAM reads and writes");
    chk(n_b2b > 0, "DRAM back-to-back requests");
    chk(n_idle > 0, "DRAM idle longer than retention");
    chk(n_refresh > (1 << DM_AW), "DRAM refresh sweep");

    $display("uMIPS steps:%p", seen);
    $display("SRAM rd=%0d wr=%0d  DRAM rd=%0d wr=%0d back-to-back=%0d idle=%0d refresh=%0d",
             n_sm_rd, n_sm_wr, n_dm_rd, n_dm_wr, n_b2b, n_idle, n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
