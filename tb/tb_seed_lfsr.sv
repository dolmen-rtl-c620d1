// Testbench of seed_lfsr: load, zero-load guard and a 200-step sequence
// against an independent bit-serial model of the same polynomial.
module tb_seed_lfsr;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] init = 0, value;
  int checks = 0, failures = 0;

  seed_lfsr dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference: Galois step written with the feedback taps spelled out.
  function automatic logic [31:0] ref_step(logic [31:0] v);
    logic fb;
    logic [31:0] n;
    fb = v[0];
    n = {1'b0, v[31:1]};
    if (fb) begin n[31] ^= 1'b1; n[21] ^= 1'b1; n[1] ^= 1'b1; n[0] ^= 1'b1; end
    return n;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 32'd7; load = 1;
    @(negedge clk); load = 0;
    check(value == 32'd7, "load value");
    r = 32'd7;
    step = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      r = ref_step(r);
      check(value == r, $sformatf("step %0d: %h vs %h", i, value, r));
    end
    step = 0;
    @(negedge clk);
    check(value == r, "hold without step");
    init = 0; load = 1;
    @(negedge clk); load = 0;
    check(value == 32'd1, "zero load replaced by 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
