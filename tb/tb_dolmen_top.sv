// End-to-end testbench of dolmen_top at reduced size (4 cores, branching
// factor 2, two link registers, Bloom filters of 2**10 and 2**8 bits per
// bank, 16-entry frontiers), with a behavioural model front end per core.
// Four runs from the host side:
//   1. acyclic model, 2 tasks per core: "ended" (the property holds);
//   2. lasso model: "found", with a state that is accepting and on a cycle;
//   3. ring model with a single accepting state: "found" with that state;
//   4. acyclic model again, 1 task.
// Probes bound into the design count each mechanism; each must occur:
//   0 frontier overwrite (stack full)     1 Known Set duplicate dropped
//   2 prefix hand-off / stall for cycle   3 cycle core drained, no cycle
//   4 cycle found                          5 prefix task ended
//   6 stale status ignored by controller   7 cycle core self-clear
module tb_dolmen_top;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  localparam int N = 4;
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
  string ev_name [8] = '{"frontier overwrite", "known-set duplicate", "prefix hand-off",
                         "cycle core no cycle", "cycle found", "prefix task ended",
                         "stale status ignored", "cycle core self-clear"};

  dolmen_top #(.N_CORES(N), .BRANCH(2), .LINK_REGS(2), .PREFIX_AW(10), .CYCLE_AW(8),
               .FRONTIER_DEPTH(16)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_m
    tb_model_frontend #(.LAT(1)) u_pm (.clk, .rst_n, .kind, .m, .req_valid(pfx_req_valid[i]),
      .req_ready(pfx_req_ready[i]), .req_data(pfx_req_data[i]), .rsp_valid(pfx_rsp_valid[i]),
      .rsp_ready(pfx_rsp_ready[i]), .rsp_data(pfx_rsp_data[i]), .n_req(p_nreq[i]));
    tb_model_frontend #(.LAT(2)) u_cm (.clk, .rst_n, .kind, .m, .req_valid(cyc_req_valid[i]),
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
    check(host_busy && !host_done, "busy after start");
    cyc = 0;
    while (!host_done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 400, 2, cyc);
    check(host_ended && !host_found, "acyclic: property holds");
    check(tb_stats_pkg::cnt[5] == 2 * N, $sformatf("every core ran 2 tasks (%0d)", tb_stats_pkg::cnt[5]));
    $display("run 1: %0d cycles", cyc);
    run(0, 600, 3, cyc);
    s = int'(host_acc_state);
    check(host_found && !host_ended, "lasso: violation found");
    check(accepting(0, 600, s) && on_cycle(0, 600, s), "reported state accepting and on a cycle");
    $display("run 2: %0d cycles, state %0d", cyc, s);
    run(2, 100, 2, cyc);
    check(host_found && host_acc_state == 32'd50, "ring: the single accepting state");
    $display("run 3: %0d cycles", cyc);
    run(1, 200, 1, cyc);
    check(host_ended && !host_found, "acyclic again: property holds");
    for (int e = 0; e < 8; e++) begin
      $display("mechanism %-22s : %0d", ev_name[e], tb_stats_pkg::cnt[e]);
      check(tb_stats_pkg::cnt[e] > 0, $sformatf("mechanism '%s' happened", ev_name[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bind frontier_stream tb_probe #(.ID(0)) u_p_ovw (.clk(clk), .ev(overwrite));
  bind known_set tb_probe #(.ID(1)) u_p_dup (.clk(clk), .ev(st == K_TEST && !is_new));
  bind reach_core tb_probe #(.ID(2)) u_p_hand (.clk(clk), .ev(MODE == 1'b0 && hit_valid && hit_ready));
  bind reach_core tb_probe #(.ID(3)) u_p_nocyc (.clk(clk), .ev(MODE == 1'b1 && done));
  bind reach_core tb_probe #(.ID(4)) u_p_found (.clk(clk), .ev(MODE == 1'b1 && hit_valid && hit_ready));
  bind reach_core tb_probe #(.ID(5)) u_p_pdone (.clk(clk), .ev(MODE == 1'b0 && done));
  bind swarm_controller tb_probe #(.ID(6)) u_p_stale (.clk(clk),
    .ev(busy && up.epoch != epoch && (up.ended || up.found)));
  bind reach_core tb_probe #(.ID(7)) u_p_sclr (.clk(clk), .ev(MODE == 1'b1 && sub_clear && !clear));
endmodule
