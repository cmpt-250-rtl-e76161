// cmpt250_top -- the designs of this collection, side by side.
//
//  * uMIPS controller: a sequencer of small state diagrams and a control point enabler
//    (a PLA that picks a micro-instruction address and a ROM that holds the control words).
//    The datapath it drives is outside: its status lines come in on umips_status and its
//    22 control points go out on umips_ctrl.
//  * Programmable logic: the worked example f2 = xy + x'y'z' + y'z, f1 = z, f0 = xy + z,
//    once in a PLA (pla_f) and once in a PAL with three product terms per output (pal_f).
//  * Storage components: a clock-enabled flip-flop, a register with load / increment /
//    shift, and a register file.
//  * A synchronous memory: a CPU-side handshake port talking cs / r / ack to a clocked
//    controller wrapped around an asynchronous SRAM (sm_* ports).
//  * A DRAM memory: the same CPU-side port talking to a DRAM controller that buffers every
//    access in DR and refreshes the array by a counter between requests (dm_* ports).
//    dm_lost pulses if a stored word was ever found destroyed or decayed. DM_ROW_WORDS > 1
//    selects the row-wide organisation (a row of words per access and per refresh step).
// All parts share clk and rst (synchronous, active high) and are otherwise independent.
// Each part's timing is given in its own module.
module cmpt250_top
  import umips_pkg::*;
#(
  parameter int unsigned REG_W       = 8,
  parameter int unsigned RF_REGS     = 32,
  parameter int unsigned RF_W        = 32,
  parameter int unsigned SM_ADDR_W   = 8,
  parameter int unsigned SM_W        = 8,
  parameter int unsigned DM_ADDR_W   = 8,
  parameter int unsigned DM_W        = 16,
  parameter int unsigned DM_ROW_WORDS = 1,
  parameter int unsigned DM_RETENTION = 20000,
  localparam int unsigned RF_AW      = $clog2(RF_REGS)
) (
  input  logic                 clk,
  input  logic                 rst,
  // uMIPS controller
  input  status_t              umips_status,
  output ctrl_t                umips_ctrl,
  output logic [N_STATES-1:0]  umips_state,
  output logic [UADDR_W-1:0]   umips_uaddr,
  // programmable logic example: {x, y, z} -> {f2, f1, f0}
  input  logic [2:0]           xyz,
  output logic [2:0]           pla_f,
  output logic [2:0]           pal_f,
  // flip-flop
  input  logic                 ff_en,
  input  logic                 ff_d,
  output logic                 ff_q,
  // register
  input  logic [2:0]           reg_op,
  input  logic [REG_W-1:0]     reg_d,
  input  logic                 reg_sin,
  output logic [REG_W-1:0]     reg_q,
  // register file
  input  logic                 rf_we,
  input  logic [RF_AW-1:0]     rf_waddr,
  input  logic [RF_W-1:0]      rf_wdata,
  input  logic                 rf_re,
  input  logic [RF_AW-1:0]     rf_raddr,
  output logic [RF_W-1:0]      rf_rdata,
  // synchronous SRAM memory, CPU side
  input  logic                 sm_start,
  input  logic                 sm_we,
  input  logic [SM_ADDR_W-1:0] sm_addr,
  input  logic [SM_W-1:0]      sm_data,
  output logic                 sm_busy,
  output logic                 sm_done,
  output logic [SM_W-1:0]      sm_mdr,
  // DRAM memory, CPU side
  input  logic                 dm_start,
  input  logic                 dm_we,
  input  logic [DM_ADDR_W-1:0] dm_addr,
  input  logic [DM_W-1:0]      dm_data,
  output logic                 dm_busy,
  output logic                 dm_done,
  output logic [DM_W-1:0]      dm_mdr,
  output logic                 dm_lost
);
  // ---------------- uMIPS controller
  umips_controller u_umips (
    .clk(clk), .rst(rst), .status(umips_status),
    .ctrl(umips_ctrl), .state(umips_state), .uaddr(umips_uaddr));

  // ---------------- programmable logic example
  pla_example u_pla_ex (.x(xyz[2]), .y(xyz[1]), .z(xyz[0]),
                        .f2(pla_f[2]), .f1(pla_f[1]), .f0(pla_f[0]));

  // PAL with 3 products per output; outputs {f2, f1, f0}, products numbered per output
  // f0: xy, z, (unused)   f1: z, (unused), (unused)   f2: xy, x'y'z', y'z
  localparam logic [8:0][2:0] PAL_T = '{3'b001, 3'b000, 3'b110,   // f2 products 2..0
                                        3'b100, 3'b100, 3'b001,   // f1
                                        3'b100, 3'b001, 3'b110};  // f0
  localparam logic [8:0][2:0] PAL_C = '{3'b010, 3'b111, 3'b000,
                                        3'b100, 3'b100, 3'b000,
                                        3'b100, 3'b000, 3'b000};
  pal #(.N_IN(3), .N_OUT(3), .PROD_PER_OUT(3), .AND_T(PAL_T), .AND_C(PAL_C))
    u_pal (.in(xyz), .out(pal_f));

  // ---------------- storage components
  flip_flop u_ff (.clk(clk), .rst(rst), .en(ff_en), .d(ff_d), .q(ff_q));

  register_unit #(.W(REG_W)) u_reg (
    .clk(clk), .rst(rst), .op(reg_op), .d(reg_d), .sin(reg_sin), .q(reg_q));

  register_file #(.N_REGS(RF_REGS), .W(RF_W)) u_rf (
    .clk(clk), .rst(rst), .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .re(rf_re), .raddr(rf_raddr), .rdata(rf_rdata));

  // ---------------- synchronous memory
  logic [SM_ADDR_W-1:0] sm_bus_addr;
  logic                 sm_bus_cs, sm_bus_r, sm_bus_ack;
  logic [SM_W-1:0]      sm_bus_wdata, sm_bus_rdata;

  cpu_mem_port #(.ADDR_W(SM_ADDR_W), .W(SM_W)) u_sm_cpu (
    .clk(clk), .rst(rst), .start(sm_start), .we(sm_we), .req_addr(sm_addr),
    .req_data(sm_data), .busy(sm_busy), .done(sm_done), .mdr(sm_mdr),
    .mem_addr(sm_bus_addr), .mem_cs(sm_bus_cs), .mem_r(sm_bus_r),
    .mem_wdata(sm_bus_wdata), .mem_ack(sm_bus_ack), .mem_rdata(sm_bus_rdata));

  sync_mem_ctrl #(.ADDR_W(SM_ADDR_W), .W(SM_W)) u_sm_mem (
    .clk(clk), .rst(rst), .cs(sm_bus_cs), .r(sm_bus_r), .addr(sm_bus_addr),
    .wdata(sm_bus_wdata), .ack(sm_bus_ack), .rdata(sm_bus_rdata));

  // ---------------- DRAM memory
  localparam int unsigned DM_ROW_W = DM_ADDR_W - $clog2(DM_ROW_WORDS);
  logic [DM_ADDR_W-1:0]         dm_bus_addr;
  logic [DM_ROW_W-1:0]          arr_row;
  logic                         dm_bus_cs, dm_bus_r, dm_bus_ack, arr_rd, arr_wr;
  logic [DM_W-1:0]              dm_bus_wdata, dm_bus_rdata;
  logic [DM_ROW_WORDS*DM_W-1:0] arr_wdata, arr_rdata;

  cpu_mem_port #(.ADDR_W(DM_ADDR_W), .W(DM_W)) u_dm_cpu (
    .clk(clk), .rst(rst), .start(dm_start), .we(dm_we), .req_addr(dm_addr),
    .req_data(dm_data), .busy(dm_busy), .done(dm_done), .mdr(dm_mdr),
    .mem_addr(dm_bus_addr), .mem_cs(dm_bus_cs), .mem_r(dm_bus_r),
    .mem_wdata(dm_bus_wdata), .mem_ack(dm_bus_ack), .mem_rdata(dm_bus_rdata));

  dram_ctrl #(.ADDR_W(DM_ADDR_W), .W(DM_W), .ROW_WORDS(DM_ROW_WORDS)) u_dm_ctrl (
    .clk(clk), .rst(rst), .cs(dm_bus_cs), .rw(dm_bus_r), .addr(dm_bus_addr),
    .wdata(dm_bus_wdata), .ack(dm_bus_ack), .rdata(dm_bus_rdata),
    .arr_row(arr_row), .arr_rd(arr_rd), .arr_wr(arr_wr),
    .arr_wdata(arr_wdata), .arr_rdata(arr_rdata));

  dram_array #(.ADDR_W(DM_ADDR_W), .W(DM_W), .ROW_WORDS(DM_ROW_WORDS), .RETENTION(DM_RETENTION))
    u_dm_array (.clk(clk), .rst(rst), .row(arr_row), .rd(arr_rd), .wr(arr_wr),
    .wdata(arr_wdata), .rdata(arr_rdata), .lost(dm_lost));
endmodule
