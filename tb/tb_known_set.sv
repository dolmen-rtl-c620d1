// Testbench of known_set: no visited state is ever passed again (no false
// negatives), false positives stay rare at a light fill, one state is handled
// every two cycles, and a clear forgets everything after 2**AW/64 cycles.
module tb_known_set;
  import dolmen_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0, clear = 0, ready, in_valid = 0, in_ready;
  logic out_valid, out_ready = 1, idle;
  cstate_t in_data = '0, out_data;
  seed_t seeds [N_HASH];
  int checks = 0, failures = 0;
  bit seen [state_t];
  int n_new, n_fp, n_dup_ok;

  known_set #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Offer one state, return whether it came out as new.
  task automatic offer(input state_t s, output bit is_new, output int cyc);
    in_data = '{state: s, accepting: s[0]};
    in_valid = 1;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!in_ready);
    @(negedge clk); in_valid = 0;
    @(negedge clk); cyc++;
    is_new = out_valid;
    if (out_valid) check(out_data == '{state: s, accepting: s[0]}, "out data");
    @(negedge clk);
    check(idle, "idle after output taken");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, t0;
    bit nw;
    state_t pool [64];
    seeds[0] = 32'h1234_5678; seeds[1] = 32'h9abc_def1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (!ready) begin @(negedge clk); t0++; end
    check(t0 == (1 << AW) / 64, $sformatf("reset clear takes %0d cycles", t0));
    for (int i = 0; i < 64; i++) pool[i] = $urandom;
    // 200 offers drawn from a pool of 64 states: many duplicates.
    for (int i = 0; i < 200; i++) begin
      state_t s;
      s = pool[$urandom_range(63)];
      offer(s, nw, cyc);
      if (seen.exists(s)) begin
        check(!nw, "visited state passed again");
        n_dup_ok++;
      end else begin
        if (nw) n_new++; else n_fp++;
        seen[s] = 1;
      end
    end
    check(n_fp <= 3, $sformatf("false positives %0d", n_fp));
    check(n_new + n_fp == seen.num(), "every distinct state seen once");
    check(n_dup_ok > 100, "duplicates exercised");
    // Throughput: back-to-back offers are taken every second cycle.
    begin
      int acc;
      acc = 0;
      in_valid = 1;
      for (int c = 0; c < 20; c++) begin
        in_data = '{state: 32'hF000_0000 + acc, accepting: 1'b0};
        #1;
        if (in_ready) acc++;
        @(negedge clk);
      end
      in_valid = 0;
      check(acc == 10, $sformatf("one state per two cycles (%0d in 20)", acc));
    end
    repeat (3) @(negedge clk);
    // Clear: the pool is forgotten.
    clear = 1; @(negedge clk); clear = 0;
    check(!ready, "not ready while clearing");
    t0 = 0;
    while (!ready) begin @(negedge clk); t0++; end
    check(t0 == (1 << AW) / 64, "clear duration");
    begin
      int again;
      again = 0;
      for (int i = 0; i < 16; i++) begin offer(pool[i], nw, cyc); if (nw) again++; end
      check(again >= 14, $sformatf("new again after clear: %0d/16", again));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
