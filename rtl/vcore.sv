// Dolmen verification core (VCore): acceptance-cycle detection on the
// product of a model and a Buchi property, in the manner of nested
// depth-first search with two partial-reachability cores.
//
// The prefix core searches from the model's initial state for accepting
// states. Each one it meets is handed to the cycle core, which searches from
// that state for a path back to it, while the prefix core waits. If the cycle
// core drains without success it clears itself and the prefix core resumes;
// if it comes back to the accepting state, a property violation is found and
// reported through the VCore controller. The cycle core always starts from a
// cleared Known Set and Frontier Stream, since the cycle may share states
// with the prefix.
//
// Each core owns a model front end (next-state generator and Buchi
// property). They are outside this module: "pfx_*" and "cyc_*" are their
// request/response ports, "init_state" is the model's initial composite
// state. The structure follows the design; the port protocol is this
// implementation's choice (see reach_core).
module vcore
  import dolmen_pkg::*;
#(
  parameter int CORE_INDEX     = 0,
  parameter int PREFIX_AW      = 19,
  parameter int CYCLE_AW       = 12,
  parameter int FRONTIER_DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  down_msg_t  down,
  output up_msg_t    up,
  input  cstate_t    init_state,
  // prefix-core model front end
  output logic       pfx_req_valid,
  input  logic       pfx_req_ready,
  output cstate_t    pfx_req_data,
  input  logic       pfx_rsp_valid,
  output logic       pfx_rsp_ready,
  input  model_rsp_t pfx_rsp_data,
  // cycle-core model front end
  output logic       cyc_req_valid,
  input  logic       cyc_req_ready,
  output cstate_t    cyc_req_data,
  input  logic       cyc_rsp_valid,
  output logic       cyc_rsp_ready,
  input  model_rsp_t cyc_rsp_data
);
  seed_t   seeds [N_HASH];
  logic    core_clear, pfx_ready, cyc_ready, pfx_start, pfx_done;
  logic    acc_valid, acc_ready, cyc_done, cyc_hit_valid;
  cstate_t acc_data, cyc_hit_data;

  vcore_controller #(.CORE_INDEX(CORE_INDEX)) u_ctrl (
    .clk, .rst_n, .down, .up, .seeds, .core_clear,
    .pfx_ready, .cyc_ready, .pfx_start, .pfx_done,
    .cyc_found(cyc_hit_valid), .cyc_state(cyc_hit_data.state)
  );

  // An accepting state starts the cycle core as soon as it is ready.
  assign acc_ready = cyc_ready;

  reach_core #(.MODE(1'b0), .AW(PREFIX_AW), .DEPTH(FRONTIER_DEPTH)) u_prefix (
    .clk, .rst_n, .seeds, .clear(core_clear), .ready(pfx_ready),
    .start(pfx_start), .start_state(init_state),
    .hit_valid(acc_valid), .hit_ready(acc_ready), .hit_data(acc_data),
    .resume(cyc_done), .done(pfx_done), .overwrite(),
    .req_valid(pfx_req_valid), .req_ready(pfx_req_ready), .req_data(pfx_req_data),
    .rsp_valid(pfx_rsp_valid), .rsp_ready(pfx_rsp_ready), .rsp_data(pfx_rsp_data)
  );

  reach_core #(.MODE(1'b1), .AW(CYCLE_AW), .DEPTH(FRONTIER_DEPTH)) u_cycle (
    .clk, .rst_n, .seeds, .clear(core_clear), .ready(cyc_ready),
    .start(acc_valid && acc_ready), .start_state(acc_data),
    .hit_valid(cyc_hit_valid), .hit_ready(1'b1), .hit_data(cyc_hit_data),
    .resume(1'b0), .done(cyc_done), .overwrite(),
    .req_valid(cyc_req_valid), .req_ready(cyc_req_ready), .req_data(cyc_req_data),
    .rsp_valid(cyc_rsp_valid), .rsp_ready(cyc_rsp_ready), .rsp_data(cyc_rsp_data)
  );
endmodule
