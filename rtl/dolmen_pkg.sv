// Shared types and constants of the Dolmen swarm verification engine.
//
// A composite state is the concatenation of the model's state and the Buchi
// property state, as produced by a model front end; it travels through a
// verification core together with the property's "accepting" flag. The
// pipeline width of 32 bits is the one the engine is built around; wider
// model states would have to be serialised, which this RTL does not do.
// The tree messages (down_msg_t, up_msg_t) and the 1-bit epoch that marks
// which start order a status belongs to are this implementation's choice.
package dolmen_pkg;

  localparam int STATE_W = 32;   // verification pipeline width
  localparam int TASK_W  = 16;   // maximum number of VTasks per core
  localparam int SEED_W  = 32;   // hash seed width
  localparam int N_HASH  = 2;    // hash functions (banks) per Bloom filter

  typedef logic [STATE_W-1:0] state_t;
  typedef logic [SEED_W-1:0]  seed_t;

  // Composite state with its Buchi acceptance flag.
  typedef struct packed {
    state_t state;
    logic   accepting;
  } cstate_t;

  // One answer of a model front end (next-state generator + Buchi property)
  // to a state request: a successor, or "none" when the state has no
  // successor. "last" marks the final answer for the request.
  typedef struct packed {
    cstate_t succ;
    logic    last;
    logic    none;
  } model_rsp_t;

  // Order travelling down the distribution tree.
  typedef struct packed {
    logic              start;      // single-cycle start pulse
    logic              epoch;      // run identifier, toggled per start
    logic [TASK_W-1:0] max_tasks;  // VTasks each core runs
  } down_msg_t;

  // Status travelling up the distribution tree.
  typedef struct packed {
    logic   ended;   // every task ran without finding a cycle
    logic   found;   // an acceptance cycle was found
    logic   epoch;   // run the status belongs to
    state_t state;   // accepting state on the cycle (valid with found)
  } up_msg_t;

  // Seeded hash of a state to a 32-bit value (multiply / xor-shift mix).
  // A state wider than 32 bits is first folded by XOR of its 32-bit chunks.
  function automatic logic [31:0] state_hash(input state_t s, input seed_t seed);
    localparam int NCH = (STATE_W + 31) / 32;
    logic [NCH*32-1:0] wide;
    logic [31:0] x;
    wide = (NCH*32)'(s);
    x = seed;
    for (int c = 0; c < NCH; c++) x = x ^ wide[c*32 +: 32];
    x = x * 32'h9E3779B1;
    x = x ^ (x >> 16);
    x = x * 32'h85EBCA6B;
    x = x ^ (x >> 13);
    x = x ^ seed;
    x = x * 32'hC2B2AE35;
    x = x ^ (x >> 16);
    return x;
  endfunction

endpackage
