// Testbench of reach_core in both modes, each driving a behavioural model
// front end.
//   Prefix mode on an acyclic model: every reachable accepting state is
//   reported once (Bloom false positives may drop a few), each report waits
//   for resume, every state is expanded at most once, "done" ends the run and
//   the core stays stopped until cleared.
//   Cycle mode: from an accepting state on a cycle the core reports that
//   state; from one on no cycle it drains and reports "done"; after both it
//   clears itself and becomes ready again.
module tb_reach_core;
  import dolmen_pkg::*;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0;
  seed_t seeds [N_HASH];
  int checks = 0, failures = 0;

  // prefix instance
  logic p_clear = 0, p_ready, p_start = 0, p_hit_valid, p_resume = 0, p_done, p_ovw;
  cstate_t p_start_state = '0, p_hit_data;
  logic p_req_valid, p_req_ready, p_rsp_valid, p_rsp_ready;
  cstate_t p_req_data; model_rsp_t p_rsp_data;
  int p_kind = 1, p_m = 200, p_nreq;
  // cycle instance
  logic c_clear = 0, c_ready, c_start = 0, c_hit_valid, c_done, c_ovw;
  cstate_t c_start_state = '0, c_hit_data;
  logic c_req_valid, c_req_ready, c_rsp_valid, c_rsp_ready;
  cstate_t c_req_data; model_rsp_t c_rsp_data;
  int c_kind = 0, c_m = 100, c_nreq;

  reach_core #(.MODE(1'b0), .AW(12), .DEPTH(256)) u_pfx (
    .clk, .rst_n, .seeds, .clear(p_clear), .ready(p_ready), .start(p_start),
    .start_state(p_start_state), .hit_valid(p_hit_valid), .hit_ready(1'b1),
    .hit_data(p_hit_data), .resume(p_resume), .done(p_done), .overwrite(p_ovw),
    .req_valid(p_req_valid), .req_ready(p_req_ready), .req_data(p_req_data),
    .rsp_valid(p_rsp_valid), .rsp_ready(p_rsp_ready), .rsp_data(p_rsp_data));
  tb_model_frontend #(.LAT(2)) u_pm (
    .clk, .rst_n, .kind(p_kind), .m(p_m), .req_valid(p_req_valid), .req_ready(p_req_ready),
    .req_data(p_req_data), .rsp_valid(p_rsp_valid), .rsp_ready(p_rsp_ready),
    .rsp_data(p_rsp_data), .n_req(p_nreq));

  reach_core #(.MODE(1'b1), .AW(10), .DEPTH(64)) u_cyc (
    .clk, .rst_n, .seeds, .clear(c_clear), .ready(c_ready), .start(c_start),
    .start_state(c_start_state), .hit_valid(c_hit_valid), .hit_ready(1'b1),
    .hit_data(c_hit_data), .resume(1'b0), .done(c_done), .overwrite(c_ovw),
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_data(c_req_data),
    .rsp_valid(c_rsp_valid), .rsp_ready(c_rsp_ready), .rsp_data(c_rsp_data));
  tb_model_frontend #(.LAT(1)) u_cm (
    .clk, .rst_n, .kind(c_kind), .m(c_m), .req_valid(c_req_valid), .req_ready(c_req_ready),
    .req_data(c_req_data), .rsp_valid(c_rsp_valid), .rsp_ready(c_rsp_ready),
    .rsp_data(c_rsp_data), .n_req(c_nreq));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Run the cycle core from state s; return 1 for a hit, 0 for done.
  task automatic cycle_run(int kind, int m, int s, output bit hit);
    c_kind = kind; c_m = m;
    while (!c_ready) @(negedge clk);
    c_start_state = '{state: state_t'(s), accepting: accepting(kind, m, s)};
    c_start = 1; @(negedge clk); c_start = 0;
    while (!c_hit_valid && !c_done) @(negedge clk);
    hit = c_hit_valid;
    if (hit) check(c_hit_data.state == state_t'(s), "cycle hit is the seed state");
    @(negedge clk);
    check(!c_ready, "cycle core clears itself");
    while (!c_ready) @(negedge clk);
  endtask

  initial begin
    bit got [int];
    int n_hits, n_exp, t;
    bit hit;
    seeds[0] = 32'hDEAD_BEEF; seeds[1] = 32'h0BAD_F00D;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- prefix core ----
    while (!p_ready) @(negedge clk);
    p_start_state = '{state: 32'd0, accepting: accepting(1, 200, 0)};
    p_start = 1; @(negedge clk); p_start = 0;
    n_hits = 0;
    t = 0;
    while (!p_done) begin
      if (p_hit_valid) begin
        int s;
        s = int'(p_hit_data.state);
        check(p_hit_data.accepting && accepting(1, 200, s), "hit is accepting");
        check(!got.exists(s), "each accepting state reported once");
        got[s] = 1; n_hits++;
        // The state is not expanded before resume.
        repeat ($urandom_range(1, 6)) begin
          @(negedge clk);
          check(!(p_req_valid && p_req_data.state == state_t'(s)), "no expansion before resume");
        end
        p_resume = 1; @(negedge clk); p_resume = 0;
      end else @(negedge clk);
    end
    n_exp = n_reach_accepting(1, 200);
    check(n_hits <= n_exp && n_hits * 100 >= n_exp * 95, $sformatf("accepting states %0d of %0d", n_hits, n_exp));
    check(p_nreq <= 200 && p_nreq >= 190, $sformatf("expansions %0d", p_nreq));
    repeat (5) begin @(negedge clk); check(!p_ready && !p_req_valid, "stopped after done"); end
    p_clear = 1; @(negedge clk); p_clear = 0;
    while (!p_ready) @(negedge clk);
    check(1'b1, "ready after clear");
    // ---- cycle core ----
    cycle_run(0, 100, 5, hit);   check(hit, "cycle through 5 found");
    cycle_run(1, 100, 3, hit);   check(!hit, "no cycle in acyclic model");
    cycle_run(2, 64, 32, hit);   check(hit, "ring cycle found");
    cycle_run(0, 100, 18, hit);  check(hit, "cycle through 18 found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
