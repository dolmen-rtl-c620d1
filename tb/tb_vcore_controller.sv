// Testbench of vcore_controller with the two reachability cores replaced by
// testbench signals: task sequencing (seed draw, clear, wait for ready,
// start), fresh seeds per task that differ between core indexes, "ended"
// after max_tasks, "found" with the state, epoch echo and abort on start.
module tb_vcore_controller;
  import dolmen_pkg::*;
  logic clk = 0, rst_n = 0;
  down_msg_t down = '0;
  up_msg_t up [2];
  seed_t seeds0 [N_HASH], seeds1 [N_HASH];
  logic [1:0] core_clear, pfx_start;
  logic pfx_ready = 1, cyc_ready = 1, pfx_done = 0, cyc_found = 0;
  state_t cyc_state = '0;
  int checks = 0, failures = 0;
  int n_start, n_clear;

  vcore_controller #(.CORE_INDEX(0)) u0 (.clk, .rst_n, .down, .up(up[0]), .seeds(seeds0),
    .core_clear(core_clear[0]), .pfx_ready, .cyc_ready, .pfx_start(pfx_start[0]),
    .pfx_done, .cyc_found, .cyc_state);
  vcore_controller #(.CORE_INDEX(1)) u1 (.clk, .rst_n, .down, .up(up[1]), .seeds(seeds1),
    .core_clear(core_clear[1]), .pfx_ready, .cyc_ready, .pfx_start(pfx_start[1]),
    .pfx_done, .cyc_found, .cyc_state);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (pfx_start[0]) n_start++;
    if (core_clear[0]) n_clear++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_start(int tasks, bit ep);
    down = '{start: 1'b1, epoch: ep, max_tasks: TASK_W'(tasks)};
    @(negedge clk); down.start = 0;
  endtask

  // Wait for the prefix start of the next task, modelling the clearing delay.
  task automatic wait_task_start();
    int t;
    t = 0;
    while (!core_clear[0] && t < 50) begin @(negedge clk); t++; end
    check(core_clear[0], "cores cleared before a task");
    pfx_ready = 0; cyc_ready = 0;
    repeat (5) begin @(negedge clk); check(!pfx_start[0], "no start while clearing"); end
    pfx_ready = 1; cyc_ready = 1;
    #1 check(pfx_start[0], "prefix started when both cores ready");
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    seed_t prev [N_HASH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Three tasks without a cycle.
    send_start(3, 1'b1);
    check(up[0].epoch == 1'b1 && !up[0].ended && !up[0].found, "status reset with epoch");
    for (int t = 0; t < 3; t++) begin
      wait_task_start();
      check(seeds0[0] != seeds0[1], "two different seeds");
      check(seeds0[0] != seeds1[0], "seeds differ between cores");
      if (t > 0) check(seeds0[0] != prev[0] && seeds0[1] != prev[1], "fresh seeds per task");
      prev = seeds0;
      repeat (10) @(negedge clk);
      check(!up[0].ended, "not ended before the last task");
      pfx_done = 1; @(negedge clk); pfx_done = 0;
    end
    @(negedge clk);
    check(up[0].ended && !up[0].found, "ended after max_tasks");
    check(n_start == 3, $sformatf("three tasks started (%0d)", n_start));
    repeat (10) @(negedge clk);
    check(n_start == 3 && up[0].ended, "stays ended");
    // Cycle found during the second task.
    send_start(5, 1'b0);
    check(up[0].epoch == 1'b0 && !up[0].ended, "new epoch");
    wait_task_start();
    pfx_done = 1; @(negedge clk); pfx_done = 0;
    wait_task_start();
    cyc_state = 32'hCAFE_0005; cyc_found = 1; @(negedge clk); cyc_found = 0;
    @(negedge clk);
    check(up[0].found && up[0].state == 32'hCAFE_0005 && !up[0].ended, "found reported");
    // A start order aborts a running task.
    send_start(2, 1'b1);
    wait_task_start();
    send_start(1, 1'b0);
    wait_task_start();
    pfx_done = 1; @(negedge clk); pfx_done = 0;
    @(negedge clk);
    check(up[0].ended && up[0].epoch == 1'b0, "restarted run ends after one task");
    // Zero tasks: ended at once.
    send_start(0, 1'b1);
    check(up[0].ended && up[0].epoch == 1'b1, "zero tasks ends immediately");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
