// Testbench of a complete vcore with behavioural model front ends: on the
// lasso model it finds an acceptance cycle and reports an accepting state
// that really lies on a cycle; on the acyclic model it runs every task and
// reports "ended", its cycle core having drained once per accepting state.
module tb_vcore;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  down_msg_t down = '0;
  up_msg_t up;
  int kind = 0, m = 300;
  cstate_t init_state;
  logic pv, pr, prv, prr, cv, cr, crv, crr;
  cstate_t pd, cd;
  model_rsp_t prd, crd;
  int p_nreq, c_nreq, n_cyc_start;
  int checks = 0, failures = 0;

  vcore #(.CORE_INDEX(3), .PREFIX_AW(11), .CYCLE_AW(9), .FRONTIER_DEPTH(128)) dut (
    .clk, .rst_n, .down, .up, .init_state,
    .pfx_req_valid(pv), .pfx_req_ready(pr), .pfx_req_data(pd),
    .pfx_rsp_valid(prv), .pfx_rsp_ready(prr), .pfx_rsp_data(prd),
    .cyc_req_valid(cv), .cyc_req_ready(cr), .cyc_req_data(cd),
    .cyc_rsp_valid(crv), .cyc_rsp_ready(crr), .cyc_rsp_data(crd));
  tb_model_frontend #(.LAT(1)) u_pm (.clk, .rst_n, .kind, .m, .req_valid(pv), .req_ready(pr),
    .req_data(pd), .rsp_valid(prv), .rsp_ready(prr), .rsp_data(prd), .n_req(p_nreq));
  tb_model_frontend #(.LAT(1)) u_cm (.clk, .rst_n, .kind, .m, .req_valid(cv), .req_ready(cr),
    .req_data(cd), .rsp_valid(crv), .rsp_ready(crr), .rsp_data(crd), .n_req(c_nreq));

  assign init_state = '{state: '0, accepting: accepting(kind, m, 0)};
  always #5 clk = ~clk;
  always @(posedge clk) if (dut.u_cycle.start) n_cyc_start++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int k, int mm, int tasks, bit ep);
    kind = k; m = mm;
    @(negedge clk);
    down = '{start: 1'b1, epoch: ep, max_tasks: TASK_W'(tasks)};
    @(negedge clk); down.start = 0;
    while (!(up.epoch == ep && (up.ended || up.found))) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 300, 4, 1'b1);
    s = int'(up.state);
    check(up.found && !up.ended, "lasso model: cycle found");
    check(accepting(0, 300, s), "reported state is accepting");
    check(on_cycle(0, 300, s), "reported state lies on a cycle");
    n_cyc_start = 0;
    run(1, 120, 2, 1'b0);
    check(up.ended && !up.found, "acyclic model: ended");
    check(n_cyc_start >= 2 * n_reach_accepting(1, 120) * 9 / 10 &&
          n_cyc_start <= 2 * n_reach_accepting(1, 120),
          $sformatf("cycle core ran per accepting state (%0d)", n_cyc_start));
    run(2, 50, 3, 1'b1);
    check(up.found && up.state == 32'd25, "single accepting state on ring found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
