// Predicate Checker of a reachability core.
//
// Sits between the Frontier Stream and the next-state generator, so every
// state is checked exactly once (the Known Set has already removed
// duplicates). Two modes:
//   MODE 0 (prefix): the predicate is "the state is Buchi-accepting". A hit
//     is offered on the hit port; once it is taken the checker holds the
//     state until "resume" (the cycle core found no cycle through it), and
//     then passes it on to be expanded like any other state.
//   MODE 1 (cycle): the predicate is "the state equals target", the accepting
//     state that seeded the cycle search. A hit means an acceptance cycle was
//     found; the state is offered on the hit port and not expanded.
// States without a hit go to "out". One state is held at a time: a state is
// taken on one edge and offered on the next, so a stage without hits passes
// one state every two cycles. "flush" drops whatever is held.
// The two predicates and the position in the pipeline follow the design;
// the hold-until-resume behaviour and the handshakes are this
// implementation's reading of how the prefix core waits for the cycle core.
module predicate_checker
  import dolmen_pkg::*;
#(
  parameter bit MODE = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  state_t  target,
  input  logic    in_valid,
  output logic    in_ready,
  input  cstate_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output cstate_t out_data,
  output logic    hit_valid,
  input  logic    hit_ready,
  output cstate_t hit_data,
  input  logic    resume,
  output logic    idle
);
  typedef enum logic [1:0] {P_EMPTY, P_HIT, P_WAIT, P_FWD} pstate_e;
  pstate_e st;
  cstate_t held;
  logic    pred;

  assign pred      = (MODE == 1'b0) ? in_data.accepting : (in_data.state == target);
  assign in_ready  = (st == P_EMPTY);
  assign out_valid = (st == P_FWD);
  assign out_data  = held;
  assign hit_valid = (st == P_HIT);
  assign hit_data  = held;
  assign idle      = (st == P_EMPTY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= P_EMPTY;
      held <= '0;
    end else if (flush) begin
      st <= P_EMPTY;
    end else begin
      unique case (st)
        P_EMPTY: if (in_valid) begin
          held <= in_data;
          st   <= pred ? P_HIT : P_FWD;
        end
        P_HIT:  if (hit_ready) st <= (MODE == 1'b0) ? P_WAIT : P_EMPTY;
        P_WAIT: if (resume) st <= P_FWD;
        P_FWD:  if (out_ready) st <= P_EMPTY;
        default: st <= P_EMPTY;
      endcase
    end
  end
endmodule
