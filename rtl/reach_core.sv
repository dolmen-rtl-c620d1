// Partial-reachability core: the Prefix Core (MODE 0) or the Cycle Core
// (MODE 1) of a verification core.
//
// A loop of four entities explores the composite state space depth first:
//   Known Set (Bloom filter)  -> Frontier Stream (bounded stack)
//   -> Predicate Checker      -> model front end (next-state generator and
//   Buchi property, outside this module) -> back to the Known Set.
// States move between entities with valid/ready handshakes. The model front
// end is asked for the successors of one state at a time ("req"); it answers
// with a stream of composite successors ending with "last", or a single
// "none" answer for a state without successors.
//
// Prefix mode: "start" injects the model's initial state into the Known Set.
// Each accepting state popped from the frontier is offered on "hit"; the core
// then waits for "resume" (no cycle through that state) before it expands
// it. When the pipeline drains, "done" pulses and the core stays stopped
// until "clear".
// Cycle mode: "start" sends the accepting state straight to the model front
// end, without entering the Known Set, so the state is seen as new when the
// search comes back to it. The Predicate Checker compares every popped state
// with it; a match is offered on "hit" (acceptance cycle found). On a hit or
// when the pipeline drains ("done") the core clears itself at once.
//
// "clear" (or the cycle core's own clearing) resets the pipeline and zeroes
// the Known Set and Frontier Stream memories word by word; "ready" rises when
// that is over and no model answer is still outstanding. Answers that arrive
// while clearing are discarded.
//
// The entity loop, the two predicates, the bypass of the Known Set by the
// cycle seed, the termination on an empty pipeline and the full reset of the
// cycle core after each run follow the design. One outstanding model request
// at a time and the exact handshakes are this implementation's choices.
module reach_core
  import dolmen_pkg::*;
#(
  parameter bit MODE  = 1'b0,
  parameter int AW    = 19,
  parameter int DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  seed_t      seeds [N_HASH],
  input  logic       clear,
  output logic       ready,
  input  logic       start,
  input  cstate_t    start_state,
  output logic       hit_valid,
  input  logic       hit_ready,
  output cstate_t    hit_data,
  input  logic       resume,
  output logic       done,
  output logic       overwrite,
  // model front end
  output logic       req_valid,
  input  logic       req_ready,
  output cstate_t    req_data,
  input  logic       rsp_valid,
  output logic       rsp_ready,
  input  model_rsp_t rsp_data
);
  typedef enum logic [1:0] {R_CLEAR, R_READY, R_RUN, R_DONE} rstate_e;
  rstate_e st;

  logic    sub_clear;
  logic    outstanding;
  logic    pend_inject, pend_seed;
  cstate_t start_q;
  logic    running;
  logic    terminated;

  // Known Set
  logic    ks_ready, ks_in_valid, ks_in_ready, ks_out_valid, ks_out_ready, ks_idle;
  cstate_t ks_in_data, ks_out_data;
  // Frontier Stream
  logic    fs_ready, fs_push_ready, fs_pop_valid, fs_pop_ready, fs_empty;
  cstate_t fs_pop_data;
  // Predicate Checker
  logic    pc_in_ready, pc_out_valid, pc_out_ready, pc_idle, pc_hit_valid, pc_hit_ready;
  cstate_t pc_out_data;

  assign running   = (st == R_RUN);
  assign ready     = (st == R_READY);
  assign hit_valid = running && pc_hit_valid;
  assign pc_hit_ready = running && hit_ready;
  assign done      = running && terminated;

  // The cycle core clears itself after a hit or after draining.
  assign sub_clear = clear ||
                     ((MODE == 1'b1) && running && ((pc_hit_valid && hit_ready) || terminated));

  // Known Set input: the prefix initial state first, then model answers.
  assign ks_in_valid = running && (pend_inject || (rsp_valid && !rsp_data.none));
  assign ks_in_data  = pend_inject ? start_q : rsp_data.succ;
  assign rsp_ready   = !running || rsp_data.none || (ks_in_ready && !pend_inject);

  // Model request: the cycle seed first, then expanded states.
  assign req_valid    = running && !outstanding && (pend_seed || pc_out_valid);
  assign req_data     = pend_seed ? start_q : pc_out_data;
  assign pc_out_ready = running && !outstanding && !pend_seed && req_ready;

  known_set #(.AW(AW)) u_known_set (
    .clk, .rst_n, .clear(sub_clear), .ready(ks_ready), .seeds,
    .in_valid(ks_in_valid), .in_ready(ks_in_ready), .in_data(ks_in_data),
    .out_valid(ks_out_valid), .out_ready(ks_out_ready), .out_data(ks_out_data),
    .idle(ks_idle)
  );

  assign ks_out_ready = fs_push_ready;

  frontier_stream #(.DEPTH(DEPTH)) u_frontier (
    .clk, .rst_n, .clear(sub_clear), .ready(fs_ready),
    .push_valid(ks_out_valid), .push_ready(fs_push_ready), .push_data(ks_out_data),
    .pop_valid(fs_pop_valid), .pop_ready(fs_pop_ready), .pop_data(fs_pop_data),
    .empty(fs_empty), .overwrite
  );

  assign fs_pop_ready = running && pc_in_ready;

  predicate_checker #(.MODE(MODE)) u_predicate (
    .clk, .rst_n, .flush(sub_clear), .target(start_q.state),
    .in_valid(fs_pop_valid && running), .in_ready(pc_in_ready), .in_data(fs_pop_data),
    .out_valid(pc_out_valid), .out_ready(pc_out_ready), .out_data(pc_out_data),
    .hit_valid(pc_hit_valid), .hit_ready(pc_hit_ready), .hit_data,
    .resume, .idle(pc_idle)
  );

  termination_checker #(.N_IDLE(4)) u_termination (
    .clk, .rst_n, .running, .frontier_empty(fs_empty),
    .idle({ks_idle, pc_idle, !outstanding, !(pend_inject || pend_seed)}),
    .terminated
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_CLEAR;
      outstanding <= 1'b0;
      pend_inject <= 1'b0;
      pend_seed   <= 1'b0;
      start_q     <= '0;
    end else begin
      if (req_valid && req_ready) outstanding <= 1'b1;
      else if (rsp_valid && rsp_ready && rsp_data.last) outstanding <= 1'b0;
      if (ks_in_valid && ks_in_ready && pend_inject) pend_inject <= 1'b0;
      if (req_valid && req_ready && pend_seed) pend_seed <= 1'b0;

      if (sub_clear) begin
        st          <= R_CLEAR;
        pend_inject <= 1'b0;
        pend_seed   <= 1'b0;
      end else begin
        unique case (st)
          R_CLEAR: if (ks_ready && fs_ready && !outstanding) st <= R_READY;
          R_READY: if (start) begin
            st          <= R_RUN;
            start_q     <= start_state;
            pend_inject <= (MODE == 1'b0);
            pend_seed   <= (MODE == 1'b1);
          end
          R_RUN:   if (terminated) st <= R_DONE;
          R_DONE:  ;
          default: st <= R_CLEAR;
        endcase
      end
    end
  end

  // A model answer never arrives without an outstanding request.
  a_rsp_has_req: assert property (@(posedge clk) disable iff (!rst_n)
                                  rsp_valid |-> outstanding);
endmodule
