// Link shift register between two internal tree nodes.
//
// Delays the downward order and the upward status by DEPTH clock cycles
// each, so that a link may span a long distance (across dies of a stacked
// silicon device) without constraining the placement of the two nodes.
// DEPTH = 0 is a plain wire. Adding such registers on the links follows the
// design; the default depth of one stage is this implementation's choice.
module link_shift_reg
  import dolmen_pkg::*;
#(
  parameter int DEPTH = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  down_msg_t down_in,
  output down_msg_t down_out,
  input  up_msg_t   up_in,
  output up_msg_t   up_out
);
  if (DEPTH == 0) begin : g_wire
    assign down_out = down_in;
    assign up_out   = up_in;
  end else begin : g_regs
    down_msg_t down_sr [DEPTH];
    up_msg_t   up_sr   [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) begin
          down_sr[i] <= '0;
          up_sr[i]   <= '0;
        end
      end else begin
        down_sr[0] <= down_in;
        up_sr[0]   <= up_in;
        for (int i = 1; i < DEPTH; i++) begin
          down_sr[i] <= down_sr[i-1];
          up_sr[i]   <= up_sr[i-1];
        end
      end
    end
    assign down_out = down_sr[DEPTH-1];
    assign up_out   = up_sr[DEPTH-1];
  end
endmodule
