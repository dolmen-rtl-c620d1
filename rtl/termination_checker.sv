// Termination checker of a reachability core.
//
// A reachability run is over when no state is left anywhere: the frontier
// stream is empty and every entity of the pipeline reports idle. Each entity
// hands states on with valid/ready handshakes and reports idle only when it
// holds none, so the conjunction of the idle flags is a true quiescent point.
// The checker raises "terminated" for a single cycle, on the clock edge after
// the condition is first seen while "running" is high; it does not fire again
// until "running" has dropped. Collecting idle flags from every entity follows
// the design; the pulse interface is this implementation's choice.
module termination_checker #(
  parameter int N_IDLE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              running,
  input  logic              frontier_empty,
  input  logic [N_IDLE-1:0] idle,
  output logic              terminated
);
  logic fired;
  logic quiet;

  assign quiet = running && frontier_empty && (&idle);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      terminated <= 1'b0;
      fired      <= 1'b0;
    end else begin
      terminated <= quiet && !fired;
      if (!running)   fired <= 1'b0;
      else if (quiet) fired <= 1'b1;
    end
  end
endmodule
