// Full-size testbench of dolmen_top: every parameter at its default (32
// cores, branching factor 3, Bloom filters of 2**19 and 2**12 bits per bank,
// 1024-entry frontiers), one behavioural model front end per core side.
// Run 1 checks a model whose property holds (acyclic): every core runs its
// task and the swarm reports "ended". Run 2 checks a lasso model: the swarm
// reports a state that is accepting and lies on a cycle. The run length is
// printed; each core first spends 2**19/64 cycles zeroing its prefix filter.
module tb_dolmen_top_full;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, host_start = 0;
  logic [TASK_W-1:0] host_max_tasks = '0;
  logic host_busy, host_done, host_ended, host_found;
  state_t host_acc_state;
  int kind = 0, m = 100;
  cstate_t init_state;
  logic [N-1:0] pfx_req_valid, pfx_req_ready, pfx_rsp_valid, pfx_rsp_ready;
  logic [N-1:0] cyc_req_valid, cyc_req_ready, cyc_rsp_valid, cyc_rsp_ready;
  cstate_t [N-1:0] pfx_req_data, cyc_req_data;
  model_rsp_t [N-1:0] pfx_rsp_data, cyc_rsp_data;
  int p_nreq [N], c_nreq [N];
  int checks = 0, failures = 0;

  dolmen_top dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_m
    tb_model_frontend #(.LAT(1)) u_pm (.clk, .rst_n, .kind, .m, .req_valid(pfx_req_valid[i]),
      .req_ready(pfx_req_ready[i]), .req_data(pfx_req_data[i]), .rsp_valid(pfx_rsp_valid[i]),
      .rsp_ready(pfx_rsp_ready[i]), .rsp_data(pfx_rsp_data[i]), .n_req(p_nreq[i]));
    tb_model_frontend #(.LAT(1)) u_cm (.clk, .rst_n, .kind, .m, .req_valid(cyc_req_valid[i]),
      .req_ready(cyc_req_ready[i]), .req_data(cyc_req_data[i]), .rsp_valid(cyc_rsp_valid[i]),
      .rsp_ready(cyc_rsp_ready[i]), .rsp_data(cyc_rsp_data[i]), .n_req(c_nreq[i]));
  end

  assign init_state = '{state: '0, accepting: accepting(kind, m, 0)};
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int k, int mm, int tasks, output int cyc);
    kind = k; m = mm;
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
    int cyc, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 300, 1, cyc);
    check(host_ended && !host_found, "acyclic: property holds");
    check(cyc > (1 << 19) / 64, "run includes the prefix filter zeroing");
    for (int i = 0; i < N; i++) check(p_nreq[i] >= 280, $sformatf("core %0d explored (%0d)", i, p_nreq[i]));
    $display("run 1: %0d cycles", cyc);
    run(0, 3000, 2, cyc);
    s = int'(host_acc_state);
    check(host_found && !host_ended, "lasso: violation found");
    check(accepting(0, 3000, s) && on_cycle(0, 3000, s), "reported state accepting and on a cycle");
    $display("run 2: %0d cycles, state %0d", cyc, s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
