// Dolmen swarm verification engine, top level.
//
// The swarm controller takes start orders from the host and hands them,
// through LINK_REGS link registers, to the root of a swarm tree of N_CORES
// verification cores (branching factor BRANCH). Each core searches the
// product of a model and a Buchi property for an acceptance cycle, with its
// own hash seeds, and the first cycle found, or the end of every core's
// tasks, comes back up the tree to the controller.
//
// The model front ends (next-state generator and Buchi property of every
// prefix and cycle core) are generated per model and are not part of this
// RTL: their request/response ports are brought out as packed arrays indexed
// by core. The host link (a UART to control software) is likewise outside:
// the host side is the plain start / max-tasks / result signals.
//
// Defaults are the evaluated configuration: 32 cores, Bloom filter address
// widths 19 (prefix) and 12 (cycle). The branching factor of 3 follows the
// three-way tree drawn for a three-die device; the link register count and
// frontier depth are this implementation's choices.
module dolmen_top
  import dolmen_pkg::*;
#(
  parameter int N_CORES        = 32,
  parameter int BRANCH         = 3,
  parameter int LINK_REGS      = 1,
  parameter int PREFIX_AW      = 19,
  parameter int CYCLE_AW       = 12,
  parameter int FRONTIER_DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host side
  input  logic                     host_start,
  input  logic [TASK_W-1:0]        host_max_tasks,
  output logic                     host_busy,
  output logic                     host_done,
  output logic                     host_ended,
  output logic                     host_found,
  output state_t                   host_acc_state,
  // model front ends
  input  cstate_t                  init_state,
  output logic       [N_CORES-1:0] pfx_req_valid,
  input  logic       [N_CORES-1:0] pfx_req_ready,
  output cstate_t    [N_CORES-1:0] pfx_req_data,
  input  logic       [N_CORES-1:0] pfx_rsp_valid,
  output logic       [N_CORES-1:0] pfx_rsp_ready,
  input  model_rsp_t [N_CORES-1:0] pfx_rsp_data,
  output logic       [N_CORES-1:0] cyc_req_valid,
  input  logic       [N_CORES-1:0] cyc_req_ready,
  output cstate_t    [N_CORES-1:0] cyc_req_data,
  input  logic       [N_CORES-1:0] cyc_rsp_valid,
  output logic       [N_CORES-1:0] cyc_rsp_ready,
  input  model_rsp_t [N_CORES-1:0] cyc_rsp_data
);
  down_msg_t ctrl_down, root_down;
  up_msg_t   ctrl_up, root_up;

  swarm_controller u_ctrl (
    .clk, .rst_n, .host_start, .host_max_tasks,
    .busy(host_busy), .done(host_done), .ended(host_ended), .found(host_found),
    .acc_state(host_acc_state), .down(ctrl_down), .up(ctrl_up)
  );

  link_shift_reg #(.DEPTH(LINK_REGS)) u_root_link (
    .clk, .rst_n, .down_in(ctrl_down), .down_out(root_down),
    .up_in(root_up), .up_out(ctrl_up)
  );

  swarm_tree #(
    .N_CORES(N_CORES), .BRANCH(BRANCH), .LINK_REGS(LINK_REGS), .CORE_BASE(0),
    .PREFIX_AW(PREFIX_AW), .CYCLE_AW(CYCLE_AW), .FRONTIER_DEPTH(FRONTIER_DEPTH)
  ) u_tree (
    .clk, .rst_n, .down(root_down), .up(root_up), .init_state,
    .pfx_req_valid, .pfx_req_ready, .pfx_req_data,
    .pfx_rsp_valid, .pfx_rsp_ready, .pfx_rsp_data,
    .cyc_req_valid, .cyc_req_ready, .cyc_req_data,
    .cyc_rsp_valid, .cyc_rsp_ready, .cyc_rsp_data
  );
endmodule
