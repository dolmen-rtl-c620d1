// Testbench of tree_node: one-cycle registered fan-out downwards; one-cycle
// registered combination upwards (ended = all ended, found = any found with
// the lowest-numbered finder's state, nothing while epochs disagree),
// checked against a reference function on random child statuses.
module tb_tree_node;
  import dolmen_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  down_msg_t down_in = '0, down_out [N];
  up_msg_t up_in [N], up_out;
  int checks = 0, failures = 0;

  tree_node #(.N_CHILD(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic up_msg_t ref_up(up_msg_t u [N]);
    up_msg_t r;
    bit agree;
    r = '0;
    r.epoch = u[0].epoch;
    agree = (u[0].epoch == u[1].epoch) && (u[1].epoch == u[2].epoch);
    r.ended = agree && u[0].ended && u[1].ended && u[2].ended;
    if (agree) begin
      if (u[0].found) begin r.found = 1; r.state = u[0].state; end
      else if (u[1].found) begin r.found = 1; r.state = u[1].state; end
      else if (u[2].found) begin r.found = 1; r.state = u[2].state; end
    end
    if (!agree) r.state = u[0].found ? u[0].state : u[1].found ? u[1].state : u[2].found ? u[2].state : '0;
    return r;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    up_msg_t exp;
    down_msg_t dexp;
    for (int i = 0; i < N; i++) up_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) begin
        up_in[i].ended = 1'($urandom_range(3) != 0);
        up_in[i].found = 1'($urandom_range(3) == 0);
        up_in[i].epoch = 1'($urandom_range(5) == 0);
        up_in[i].state = $urandom;
      end
      down_in = down_msg_t'($urandom);
      exp = ref_up(up_in);
      dexp = down_in;
      @(negedge clk);
      check(up_out.ended == exp.ended && up_out.found == exp.found && up_out.epoch == exp.epoch,
            "up flags");
      if (exp.found) check(up_out.state == exp.state, "up state of lowest finder");
      for (int i = 0; i < N; i++) check(down_out[i] == dexp, "down fan-out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
