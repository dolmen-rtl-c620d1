// Testbench of swarm_tree with 5 cores, branching factor 2 and two link
// registers: the recursive split reaches every core (each core's model front
// end is used), a cycle found by any core reaches the root, and "ended" only
// when every core has ended.
module tb_swarm_tree;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  down_msg_t down = '0;
  up_msg_t up;
  int kind = 0, m = 100;
  cstate_t init_state;
  logic [N-1:0] pv, pr, prv, prr, cv, cr, crv, crr;
  cstate_t [N-1:0] pd, cd;
  model_rsp_t [N-1:0] prd, crd;
  int p_nreq [N], c_nreq [N];
  int checks = 0, failures = 0;
  int first_req [N];
  bit got_first [N];

  // The first state each prefix core expands must be the initial state.
  always @(negedge clk)
    for (int i = 0; i < N; i++)
      if (pv[i] && pr[i] && !got_first[i]) begin
        got_first[i] = 1'b1;
        first_req[i] = int'(pd[i].state);
      end

  swarm_tree #(.N_CORES(N), .BRANCH(2), .LINK_REGS(2), .PREFIX_AW(10), .CYCLE_AW(8),
               .FRONTIER_DEPTH(32)) dut (
    .clk, .rst_n, .down, .up, .init_state,
    .pfx_req_valid(pv), .pfx_req_ready(pr), .pfx_req_data(pd),
    .pfx_rsp_valid(prv), .pfx_rsp_ready(prr), .pfx_rsp_data(prd),
    .cyc_req_valid(cv), .cyc_req_ready(cr), .cyc_req_data(cd),
    .cyc_rsp_valid(crv), .cyc_rsp_ready(crr), .cyc_rsp_data(crd));

  for (genvar i = 0; i < N; i++) begin : g_m
    tb_model_frontend #(.LAT(1)) u_pm (.clk, .rst_n, .kind, .m, .req_valid(pv[i]),
      .req_ready(pr[i]), .req_data(pd[i]), .rsp_valid(prv[i]), .rsp_ready(prr[i]),
      .rsp_data(prd[i]), .n_req(p_nreq[i]));
    tb_model_frontend #(.LAT(1)) u_cm (.clk, .rst_n, .kind, .m, .req_valid(cv[i]),
      .req_ready(cr[i]), .req_data(cd[i]), .rsp_valid(crv[i]), .rsp_ready(crr[i]),
      .rsp_data(crd[i]), .n_req(c_nreq[i]));
  end

  assign init_state = '{state: '0, accepting: accepting(kind, m, 0)};
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int k, int mm, int tasks, bit ep, output int cyc);
    kind = k; m = mm;
    @(negedge clk);
    down = '{start: 1'b1, epoch: ep, max_tasks: TASK_W'(tasks)};
    @(negedge clk); down.start = 0;
    cyc = 0;
    while (!(up.epoch == ep && (up.ended || up.found))) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, n_prev [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 80, 2, 1'b1, cyc);
    check(up.ended && !up.found, "acyclic: ended");
    for (int i = 0; i < N; i++) check(p_nreq[i] > 80, $sformatf("core %0d explored", i));
    for (int i = 0; i < N; i++) check(c_nreq[i] > 0, $sformatf("core %0d cycle core ran", i));
    for (int i = 0; i < N; i++) check(got_first[i] && first_req[i] == 0, $sformatf("core %0d began at the initial state", i));
    repeat (3) @(negedge clk);
    check(pv == '0 && cv == '0, "no model request once ended");
    for (int i = 0; i < N; i++) n_prev[i] = p_nreq[i];
    run(2, 60, 2, 1'b0, cyc);
    check(up.found && up.state == 32'd30, "ring: accepting state found");
    run(0, 200, 2, 1'b1, cyc);
    check(up.found && accepting(0, 200, int'(up.state)) && on_cycle(0, 200, int'(up.state)),
          "lasso: accepting state on a cycle");
    for (int i = 0; i < N; i++) check(p_nreq[i] > n_prev[i], $sformatf("core %0d restarted", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
