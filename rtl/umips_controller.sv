// umips_controller -- the uMIPS controller: sequencer plus control point enabler.
//
// The sequencer advances its state diagrams from the F flag and the opcode; the control
// point enabler turns the current state lines and the datapath status into the
// micro-instruction that drives the 22 datapath control points for this clock cycle.
//
// Interface: clk, rst (synchronous, active high), status in; ctrl, state lines and
// micro-instruction address out. An assertion checks that at most one step is active.
// Timing: ctrl is combinational from state (registered)
// and status; the datapath is expected to act on ctrl at the next rising edge.
// The two-part structure is the lecture's.
module umips_controller
  import umips_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  status_t             status,
  output ctrl_t               ctrl,
  output logic [N_STATES-1:0] state,
  output logic [UADDR_W-1:0]  uaddr
);
  umips_sequencer u_seq (.clk(clk), .rst(rst), .status(status), .state(state));
  logic [N_STEPS-1:0] step;

  umips_cpe       u_cpe (.state(state), .status(status), .step(step), .uaddr(uaddr),
                         .ctrl(ctrl));

`ifndef SYNTHESIS
  // the micro-instruction address encodes one step: never two at once
  always_ff @(posedge clk)
    if (!rst) assert ($onehot0(step)) else $error("umips_controller: two steps active at once");
`endif
endmodule
