// Event probe bound into design modules by the system testbenches: counts
// the clock cycles on which "ev" is high into tb_stats_pkg::cnt[ID].
module tb_probe #(
  parameter int ID = 0
) (
  input logic clk,
  input logic ev
);
  always @(posedge clk) if (ev) tb_stats_pkg::cnt[ID]++;
endmodule
