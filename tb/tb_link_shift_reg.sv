// Testbench of link_shift_reg: both directions are delayed by exactly DEPTH
// cycles and carry the whole message.
module tb_link_shift_reg;
  import dolmen_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst_n = 0;
  down_msg_t down_in = '0, down_out;
  up_msg_t up_in = '0, up_out;
  down_msg_t dh [$];
  up_msg_t uh [$];
  int checks = 0, failures = 0;

  link_shift_reg #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin dh.push_back('0); uh.push_back('0); end
    for (int t = 0; t < 100; t++) begin
      down_in = down_msg_t'($urandom);
      up_in   = up_msg_t'({$urandom, $urandom});
      dh.push_back(down_in);
      uh.push_back(up_in);
      @(negedge clk);
      void'(dh.pop_front());
      void'(uh.pop_front());
      check(down_out == dh[0], "down delay");
      check(up_out == uh[0], "up delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
