// Testbench of swarm_controller with the tree replaced by testbench status:
// one start pulse per order with the task count and a toggled epoch, stale
// status of the previous epoch ignored, "ended" and "found" results, and a
// start while busy ignored.
module tb_swarm_controller;
  import dolmen_pkg::*;
  logic clk = 0, rst_n = 0, host_start = 0;
  logic [TASK_W-1:0] host_max_tasks = '0;
  logic busy, done, ended, found;
  state_t acc_state;
  down_msg_t down;
  up_msg_t up = '0;
  int checks = 0, failures = 0, n_pulse = 0;

  swarm_controller dut (.*);
  always #5 clk = ~clk;
  always @(negedge clk) if (down.start) n_pulse++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ep;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    // Run 1: stale "ended" of epoch 0 must be ignored, then found.
    up = '{ended: 1'b1, found: 1'b0, epoch: 1'b0, state: '0};
    host_max_tasks = 16'd7; host_start = 1; @(negedge clk); host_start = 0;
    check(busy && down.start && down.max_tasks == 16'd7, "start order sent");
    ep = down.epoch;
    check(ep == 1'b1, "epoch toggled");
    @(negedge clk);
    check(!down.start, "single start pulse");
    repeat (5) begin @(negedge clk); check(busy && !done, "stale status ignored"); end
    host_start = 1; @(negedge clk); host_start = 0;
    check(n_pulse == 1, "start while busy ignored");
    up = '{ended: 1'b0, found: 1'b1, epoch: ep, state: 32'h1234};
    @(negedge clk);
    check(!busy && done && found && !ended && acc_state == 32'h1234, "found result");
    // Run 2: ended.
    host_start = 1; @(negedge clk); host_start = 0;
    check(busy && !done && down.epoch == !ep, "second run, new epoch");
    repeat (3) begin @(negedge clk); check(busy, "old found ignored"); end
    up = '{ended: 1'b1, found: 1'b0, epoch: !ep, state: '0};
    @(negedge clk);
    check(done && ended && !found && !busy, "ended result");
    check(n_pulse == 2, "two start pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
