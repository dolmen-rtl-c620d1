// Hash-seed generator of a verification core.
//
// A Galois linear feedback shift register. It is loaded with a per-core value
// derived from the core's index, so that every core draws a different seed
// sequence, and advanced once per "step". Using an LFSR seeded from the core
// index follows the design; the width, the tap polynomial
// (x^32 + x^22 + x^2 + x + 1) and the load/step interface are choices of
// this implementation. An all-zero load value is replaced by 1, because the
// register would stay at zero forever.
// Timing: value changes on the clock edge after load or step.
module seed_lfsr #(
  parameter int          W    = 32,
  parameter logic [W-1:0] POLY = 32'h80200003
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] init,
  input  logic         step,
  output logic [W-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      value <= W'(1);
    else if (load)
      value <= (init == '0) ? W'(1) : init;
    else if (step)
      value <= value[0] ? ((value >> 1) ^ POLY) : (value >> 1);
  end
endmodule
