// Testbench of predicate_checker in both modes: prefix mode flags accepting
// states, holds them until resume and then forwards them; cycle mode flags
// the target state and forwards every other state.
module tb_predicate_checker;
  import dolmen_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  state_t target = 32'd77;
  logic [1:0] in_valid = '0, in_ready, out_valid, out_ready = '1, hit_valid, hit_ready = '1, idle;
  logic [1:0] resume = '0;
  cstate_t in_data = '0, out_data [2], hit_data [2];
  int checks = 0, failures = 0;

  predicate_checker #(.MODE(1'b0)) u_pfx (
    .clk, .rst_n, .flush, .target, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_data,
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]),
    .hit_valid(hit_valid[0]), .hit_ready(hit_ready[0]), .hit_data(hit_data[0]),
    .resume(resume[0]), .idle(idle[0]));
  predicate_checker #(.MODE(1'b1)) u_cyc (
    .clk, .rst_n, .flush, .target, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_data,
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]),
    .hit_valid(hit_valid[1]), .hit_ready(hit_ready[1]), .hit_data(hit_data[1]),
    .resume(resume[1]), .idle(idle[1]));
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Feed one state to checker i; report where it went.
  task automatic feed(int i, cstate_t c, output bit went_out, output bit went_hit);
    in_data = c; in_valid[i] = 1;
    @(negedge clk); in_valid[i] = 0;
    went_out = out_valid[i]; went_hit = hit_valid[i];
    if (went_out) check(out_data[i] == c, "out data");
    if (went_hit) check(hit_data[i] == c, "hit data");
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit o, h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      cstate_t c;
      c.state = (n % 5 == 0) ? target : state_t'($urandom_range(200));
      c.accepting = 1'($urandom);
      // prefix mode
      feed(0, c, o, h);
      check(h == c.accepting && o == !c.accepting, "prefix routing");
      if (h) begin
        check(!idle[0] && !out_valid[0], "prefix holds after hit");
        repeat ($urandom_range(4)) begin @(negedge clk); check(!out_valid[0] && !in_ready[0], "waits for resume"); end
        resume[0] = 1; @(negedge clk); resume[0] = 0;
        check(out_valid[0] && out_data[0] == c, "forwarded after resume");
        @(negedge clk);
      end
      check(idle[0], "prefix idle again");
      // cycle mode
      feed(1, c, o, h);
      check(h == (c.state == target) && o == (c.state != target), "cycle routing");
      check(idle[1], "cycle idle again");
    end
    // Back-pressure: out not taken keeps the state.
    out_ready[1] = 0;
    feed(1, '{state: 32'd5, accepting: 1'b0}, o, h);
    check(out_valid[1] && !in_ready[1], "held under back-pressure");
    flush = 1; @(negedge clk); flush = 0;
    check(idle[1] && !out_valid[1], "flush drops the state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
