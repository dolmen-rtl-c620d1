// Testbench of frontier_stream: last-in first-out order, overwrite of the
// oldest entries when full (with the overwrite pulse), push and pop in one
// cycle, and sequential clearing, against a queue model of the bounded stack.
module tb_frontier_stream;
  import dolmen_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, clear = 0, ready, push_valid = 0, push_ready;
  logic pop_valid, pop_ready = 0, empty, overwrite;
  cstate_t push_data = '0, pop_data;
  cstate_t model [$];
  int checks = 0, failures = 0, n_ovw = 0, n_ovw_exp = 0;

  frontier_stream #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (overwrite) n_ovw++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (!ready) begin @(negedge clk); t0++; end
    check(t0 == D, "reset clear takes DEPTH cycles");
    check(empty && !pop_valid, "empty after clear");
    // Random mix of push, pop and both.
    for (int i = 0; i < 400; i++) begin
      int op;
      op = $urandom_range(3);
      push_valid = (op == 0 || op == 2 || op == 3 && i < 60);
      pop_ready  = (op == 1 || op == 2);
      push_data  = cstate_t'({$urandom, 1'($urandom)});
      #1;
      check(pop_valid == (model.size() != 0), "pop_valid");
      check(empty == (model.size() == 0), "empty");
      if (pop_valid && pop_ready) check(pop_data == model[$], "LIFO data");
      @(posedge clk);
      if (pop_valid && pop_ready && push_valid) begin
        model[$] = push_data;
      end else if (pop_valid && pop_ready) begin
        void'(model.pop_back());
      end else if (push_valid) begin
        model.push_back(push_data);
        if (model.size() > D) begin void'(model.pop_front()); n_ovw_exp++; end
      end
      @(negedge clk);
    end
    push_valid = 0; pop_ready = 0;
    check(n_ovw == n_ovw_exp && n_ovw > 0, $sformatf("overwrites %0d/%0d", n_ovw, n_ovw_exp));
    // Drain what is left, then clear.
    pop_ready = 1;
    while (model.size() != 0) begin
      #1 check(pop_data == model[$], "drain order");
      void'(model.pop_back());
      @(negedge clk);
    end
    check(empty, "empty after drain");
    pop_ready = 0;
    push_valid = 1; push_data = '1; @(negedge clk); push_valid = 0;
    clear = 1; @(negedge clk); clear = 0;
    check(empty && !ready, "clear empties and starts zeroing");
    t0 = 0;
    while (!ready) begin @(negedge clk); t0++; end
    check(t0 == D - 1 || t0 == D, "clear duration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
