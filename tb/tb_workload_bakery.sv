// Workload testbench: the swarm (reduced to 4 cores, branching factor 2,
// Bloom filters of 2**12 and 2**10 bits per bank, 64-entry frontiers) checks
// a two-process bakery mutual-exclusion model against two liveness
// properties (see tb_model_pkg, kinds 3 and 4), a small-scale version of the
// bakery benchmarks. The expected verdict of each property is first worked
// out by an exhaustive search in the testbench:
//   property A (waiting from the request): violated; the swarm must report
//     an accepting state that lies on a cycle;
//   property B (waiting once it holds a ticket): holds; the swarm must end
//     its tasks without a report.
module tb_workload_bakery;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, host_start = 0;
  logic [TASK_W-1:0] host_max_tasks = '0;
  logic host_busy, host_done, host_ended, host_found;
  state_t host_acc_state;
  int kind = 3, m = 0;
  cstate_t init_state;
  logic [N-1:0] pfx_req_valid, pfx_req_ready, pfx_rsp_valid, pfx_rsp_ready;
  logic [N-1:0] cyc_req_valid, cyc_req_ready, cyc_rsp_valid, cyc_rsp_ready;
  cstate_t [N-1:0] pfx_req_data, cyc_req_data;
  model_rsp_t [N-1:0] pfx_rsp_data, cyc_rsp_data;
  int p_nreq [N], c_nreq [N];
  int checks = 0, failures = 0;

  dolmen_top #(.N_CORES(N), .BRANCH(2), .LINK_REGS(1), .PREFIX_AW(12), .CYCLE_AW(10),
               .FRONTIER_DEPTH(64)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_m
    tb_model_frontend #(.LAT(1)) u_pm (.clk, .rst_n, .kind, .m, .req_valid(pfx_req_valid[i]),
      .req_ready(pfx_req_ready[i]), .req_data(pfx_req_data[i]), .rsp_valid(pfx_rsp_valid[i]),
      .rsp_ready(pfx_rsp_ready[i]), .rsp_data(pfx_rsp_data[i]), .n_req(p_nreq[i]));
    tb_model_frontend #(.LAT(1)) u_cm (.clk, .rst_n, .kind, .m, .req_valid(cyc_req_valid[i]),
      .req_ready(cyc_req_ready[i]), .req_data(cyc_req_data[i]), .rsp_valid(cyc_rsp_valid[i]),
      .rsp_ready(cyc_rsp_ready[i]), .rsp_data(cyc_rsp_data[i]), .n_req(c_nreq[i]));
  end

  assign init_state = '{state: '0, accepting: 1'b0};
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int k, int tasks, output int cyc);
    kind = k;
    @(negedge clk);
    host_max_tasks = TASK_W'(tasks);
    host_start = 1; @(negedge clk); host_start = 0;
    cyc = 0;
    while (!host_done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, ns, s;
    bit viol;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Property A
    viol = exists_acc_cycle(3, 0, ns);
    $display("bakery, property A: %0d product states, violated=%0d", ns, viol);
    check(viol, "reference: property A is violated");
    run(3, 4, cyc);
    s = int'(host_acc_state);
    check(host_found, "swarm reports the violation of property A");
    check(accepting(3, 0, s) && on_cycle(3, 0, s), "reported state is accepting and on a cycle");
    $display("property A: found state %h after %0d cycles", s, cyc);
    // Property B
    viol = exists_acc_cycle(4, 0, ns);
    $display("bakery, property B: %0d product states, violated=%0d", ns, viol);
    check(!viol, "reference: property B holds");
    run(4, 2, cyc);
    check(host_ended && !host_found, "swarm ends without a report for property B");
    $display("property B: ended after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
