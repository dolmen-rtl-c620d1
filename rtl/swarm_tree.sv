// Swarm tree: a recursive n-ary distribution tree of verification cores.
//
// A swarm tree of N_CORES cores is a tree node with either the cores
// themselves as children (N_CORES <= BRANCH) or BRANCH smaller swarm trees,
// each reached through a link shift register of LINK_REGS stages. Cores are
// shared between sub-trees as evenly as possible; a core's index is
// CORE_BASE plus its position, and seeds its hash LFSR. At the root, each
// sub-tree would be placed on its own die of a multi-die FPGA, so that one
// channel per die crosses die boundaries.
//
// The model front-end ports of all cores below are flat packed arrays,
// element i belonging to core CORE_BASE + i. Latency of an order from this
// tree's input to a core: one cycle per tree node plus LINK_REGS per link.
// Recursive instantiation with configurable branching factor, link register
// count and core count follows the design; the even split is this
// implementation's choice.
// Lint note: Verilator, when it lints this recursive module as its own top,
// reports the model-port outputs of the outermost instance as undriven. This
// comes from how it copies recursive modules; linted under dolmen_top the
// same code gives no such warning, and the testbenches show every core's
// ports driven.
module swarm_tree
  import dolmen_pkg::*;
#(
  parameter int N_CORES        = 32,
  parameter int BRANCH         = 3,
  parameter int LINK_REGS      = 1,
  parameter int CORE_BASE      = 0,
  parameter int PREFIX_AW      = 19,
  parameter int CYCLE_AW       = 12,
  parameter int FRONTIER_DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  down_msg_t                down,
  output up_msg_t                  up,
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
  function automatic int child_n(int i);
    return N_CORES / BRANCH + ((i < N_CORES % BRANCH) ? 1 : 0);
  endfunction
  function automatic int child_off(int i);
    return i * (N_CORES / BRANCH) + ((i < N_CORES % BRANCH) ? i : N_CORES % BRANCH);
  endfunction

  if (N_CORES <= BRANCH) begin : g_leaf
    down_msg_t down_c [N_CORES];
    up_msg_t   up_c   [N_CORES];

    tree_node #(.N_CHILD(N_CORES)) u_node (
      .clk, .rst_n, .down_in(down), .down_out(down_c), .up_in(up_c), .up_out(up)
    );

    for (genvar i = 0; i < N_CORES; i++) begin : g_core
      vcore #(
        .CORE_INDEX(CORE_BASE + i), .PREFIX_AW(PREFIX_AW),
        .CYCLE_AW(CYCLE_AW), .FRONTIER_DEPTH(FRONTIER_DEPTH)
      ) u_vcore (
        .clk, .rst_n, .down(down_c[i]), .up(up_c[i]), .init_state,
        .pfx_req_valid(pfx_req_valid[i]), .pfx_req_ready(pfx_req_ready[i]),
        .pfx_req_data(pfx_req_data[i]), .pfx_rsp_valid(pfx_rsp_valid[i]),
        .pfx_rsp_ready(pfx_rsp_ready[i]), .pfx_rsp_data(pfx_rsp_data[i]),
        .cyc_req_valid(cyc_req_valid[i]), .cyc_req_ready(cyc_req_ready[i]),
        .cyc_req_data(cyc_req_data[i]), .cyc_rsp_valid(cyc_rsp_valid[i]),
        .cyc_rsp_ready(cyc_rsp_ready[i]), .cyc_rsp_data(cyc_rsp_data[i])
      );
    end
  end else begin : g_inner
    down_msg_t down_c [BRANCH];
    up_msg_t   up_c   [BRANCH];

    tree_node #(.N_CHILD(BRANCH)) u_node (
      .clk, .rst_n, .down_in(down), .down_out(down_c), .up_in(up_c), .up_out(up)
    );

    for (genvar i = 0; i < BRANCH; i++) begin : g_sub
      localparam int N   = child_n(i);
      localparam int OFF = child_off(i);
      down_msg_t down_l;
      up_msg_t   up_l;

      link_shift_reg #(.DEPTH(LINK_REGS)) u_link (
        .clk, .rst_n, .down_in(down_c[i]), .down_out(down_l),
        .up_in(up_l), .up_out(up_c[i])
      );

      swarm_tree #(
        .N_CORES(N), .BRANCH(BRANCH), .LINK_REGS(LINK_REGS),
        .CORE_BASE(CORE_BASE + OFF), .PREFIX_AW(PREFIX_AW),
        .CYCLE_AW(CYCLE_AW), .FRONTIER_DEPTH(FRONTIER_DEPTH)
      ) u_sub (
        .clk, .rst_n, .down(down_l), .up(up_l), .init_state,
        .pfx_req_valid(pfx_req_valid[OFF +: N]), .pfx_req_ready(pfx_req_ready[OFF +: N]),
        .pfx_req_data(pfx_req_data[OFF +: N]), .pfx_rsp_valid(pfx_rsp_valid[OFF +: N]),
        .pfx_rsp_ready(pfx_rsp_ready[OFF +: N]), .pfx_rsp_data(pfx_rsp_data[OFF +: N]),
        .cyc_req_valid(cyc_req_valid[OFF +: N]), .cyc_req_ready(cyc_req_ready[OFF +: N]),
        .cyc_req_data(cyc_req_data[OFF +: N]), .cyc_rsp_valid(cyc_rsp_valid[OFF +: N]),
        .cyc_rsp_ready(cyc_rsp_ready[OFF +: N]), .cyc_rsp_data(cyc_rsp_data[OFF +: N])
      );
    end
  end
endmodule
