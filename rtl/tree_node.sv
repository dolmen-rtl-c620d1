// Tree node of the n-ary distribution tree.
//
// Downwards, the node registers the order from its parent and fans the
// registered copy out to its N_CHILD children. Upwards, it registers one
// status summarising its children: "ended" when every child has ended,
// "found" when any child has found a cycle, with the accepting state of the
// lowest-numbered child that found one. Children still answering an older
// start order (their epochs differ) make the node report neither. Each node
// thus adds one cycle of latency in each direction, turning the tree into a
// shift-register chain from the swarm controller to every core.
// Registering in both directions follows the design; the combining rule is
// this implementation's choice.
module tree_node
  import dolmen_pkg::*;
#(
  parameter int N_CHILD = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  down_msg_t down_in,
  output down_msg_t down_out [N_CHILD],
  input  up_msg_t   up_in [N_CHILD],
  output up_msg_t   up_out
);
  down_msg_t down_q;
  up_msg_t   up_d;

  always_comb begin
    logic agree, all_ended, any_found;
    agree     = 1'b1;
    all_ended = 1'b1;
    any_found = 1'b0;
    up_d      = '0;
    up_d.epoch = up_in[0].epoch;
    for (int i = 0; i < N_CHILD; i++) begin
      if (up_in[i].epoch != up_in[0].epoch) agree = 1'b0;
      if (!up_in[i].ended) all_ended = 1'b0;
    end
    for (int i = N_CHILD - 1; i >= 0; i--) begin
      if (up_in[i].found) begin
        any_found  = 1'b1;
        up_d.state = up_in[i].state;
      end
    end
    up_d.ended = agree && all_ended;
    up_d.found = agree && any_found;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      down_q <= '0;
      up_out <= '0;
    end else begin
      down_q <= down_in;
      up_out <= up_d;
    end
  end

  always_comb
    for (int i = 0; i < N_CHILD; i++) down_out[i] = down_q;
endmodule
