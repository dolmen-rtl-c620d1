// Testbench of termination_checker: the pulse comes one cycle after the
// quiescent condition, once per run, and never while an entity is busy, the
// frontier holds states or the core is not running.
module tb_termination_checker;
  logic clk = 0, rst_n = 0, running = 0, frontier_empty = 0, terminated;
  logic [3:0] idle = '0;
  int checks = 0, failures = 0;

  termination_checker #(.N_IDLE(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Quiet but not running: no pulse.
    idle = '1; frontier_empty = 1;
    repeat (3) begin @(negedge clk); check(!terminated, "not running"); end
    // Running with one entity busy, then the frontier non-empty.
    running = 1; idle = 4'b1011;
    repeat (3) begin @(negedge clk); check(!terminated, "entity busy"); end
    idle = '1; frontier_empty = 0;
    repeat (3) begin @(negedge clk); check(!terminated, "frontier not empty"); end
    // Now quiet: the pulse follows on the next edge, for one cycle only.
    frontier_empty = 1;
    check(!terminated, "no combinational pulse");
    @(negedge clk); check(terminated, "pulse after one edge");
    @(negedge clk); check(!terminated, "single-cycle pulse");
    repeat (3) begin @(negedge clk); check(!terminated, "no second pulse"); end
    // A new run (running drops and rises) fires again.
    running = 0; @(negedge clk); running = 1;
    @(negedge clk); check(terminated, "pulse in second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
