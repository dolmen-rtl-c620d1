// Frontier Stream of a reachability core: a bounded stack.
//
// States are pushed by the Known Set and popped, last in first out, by the
// Predicate Checker, which gives the search its depth-first order. The stack
// lives in a circular buffer of DEPTH entries: when it is full, a push
// overwrites the oldest entry ("overwrite" pulses for that cycle), so the
// search forgets the deepest-buried part of its frontier instead of stalling.
// A push and a pop in the same cycle replace the top entry. The top entry is
// read asynchronously ("pop_data" is valid whenever "pop_valid" is high).
// "clear" empties the stack and writes zero to every entry in turn
// (DEPTH cycles, "ready" low meanwhile).
//
// The stack over an overwriting circular buffer and the sequential zeroing
// follow the design; the depth (a power of two), the asynchronous read and
// the handshake are this implementation's choices.
module frontier_stream
  import dolmen_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  output logic    ready,
  input  logic    push_valid,
  output logic    push_ready,
  input  cstate_t push_data,
  output logic    pop_valid,
  input  logic    pop_ready,
  output cstate_t pop_data,
  output logic    empty,
  output logic    overwrite
);
  localparam int PW = $clog2(DEPTH);

  cstate_t          mem [DEPTH];
  logic [PW-1:0]    top;        // next free slot
  logic [PW-1:0]    top_m1;     // current top entry
  logic [PW:0]      count;
  logic [PW-1:0]    clr_addr;
  logic             clearing;
  logic             do_push, do_pop;

  assign top_m1     = top - 1'b1;
  assign ready      = !clearing;
  assign push_ready = !clearing;
  assign empty      = (count == '0);
  assign pop_valid  = !clearing && !empty;
  assign pop_data   = mem[top_m1];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign overwrite  = do_push && !do_pop && (count == (PW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (clearing)
      mem[clr_addr] <= '0;
    else if (do_push && do_pop)
      mem[top_m1] <= push_data;
    else if (do_push)
      mem[top] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
      top      <= '0;
      count    <= '0;
    end else if (clear) begin
      clearing <= 1'b1;
      clr_addr <= '0;
      top      <= '0;
      count    <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == PW'(DEPTH - 1)) clearing <= 1'b0;
    end else begin
      if (do_push && !do_pop) begin
        top <= top + 1'b1;
        if (count != (PW+1)'(DEPTH)) count <= count + 1'b1;
      end else if (do_pop && !do_push) begin
        top   <= top_m1;
        count <= count - 1'b1;
      end
    end
  end
endmodule
