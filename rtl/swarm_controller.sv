// Swarm controller: task-level control of the whole swarm.
//
// Takes a start order and the maximum number of verification tasks per core
// from the host, and sends one start pulse down the distribution tree. Every
// core runs the same tasks with its own seeds, so no core is addressed
// individually. The controller then watches the status coming up from the
// root: the run is over when every core has ended without finding a cycle
// ("ended") or when some core has found one ("found", with the accepting
// state on the cycle). "busy" is high from the start order to that point;
// "done" then stays high with the result until the next start.
// Each start toggles a 1-bit epoch carried with the order and echoed by the
// cores, so status left over from the previous run is ignored. A start while
// busy is ignored. The broadcast and the two results follow the design; the
// epoch and the host-side signals are this implementation's choices.
module swarm_controller
  import dolmen_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_start,
  input  logic [TASK_W-1:0] host_max_tasks,
  output logic              busy,
  output logic              done,
  output logic              ended,
  output logic              found,
  output state_t            acc_state,
  output down_msg_t         down,
  input  up_msg_t           up
);
  logic epoch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch     <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      ended     <= 1'b0;
      found     <= 1'b0;
      acc_state <= '0;
      down      <= '0;
    end else begin
      down.start <= 1'b0;
      if (!busy && host_start) begin
        epoch          <= !epoch;
        down.start     <= 1'b1;
        down.epoch     <= !epoch;
        down.max_tasks <= host_max_tasks;
        busy           <= 1'b1;
        done           <= 1'b0;
        ended          <= 1'b0;
        found          <= 1'b0;
      end else if (busy && (up.epoch == epoch) && (up.found || up.ended)) begin
        busy      <= 1'b0;
        done      <= 1'b1;
        found     <= up.found;
        ended     <= !up.found;
        acc_state <= up.state;
      end
    end
  end
endmodule
