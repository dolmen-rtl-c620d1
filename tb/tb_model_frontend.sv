// Behavioural model front end (next-state generator and Buchi property
// together) for the testbenches. It accepts one state request, waits LAT
// cycles, then answers with the successors of the toy model selected by
// "kind" (see tb_model_pkg), each carrying its accepting flag, the last one
// marked "last"; a state without successors gets a single "none" answer.
// Successor answers are offered one per cycle under valid/ready. "n_req"
// counts the requests served.
module tb_model_frontend
  import dolmen_pkg::*;
  import tb_model_pkg::*;
#(
  parameter int LAT = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  int         kind,
  input  int         m,
  input  logic       req_valid,
  output logic       req_ready,
  input  cstate_t    req_data,
  output logic       rsp_valid,
  input  logic       rsp_ready,
  output model_rsp_t rsp_data,
  output int         n_req
);
  int s, k, n, wait_cnt;
  logic busy;

  assign req_ready = !busy;

  always_comb begin
    int y;
    y = (k < n) ? succ(kind, m, s, k) : 0;
    rsp_valid          = busy && (wait_cnt == 0);
    rsp_data.succ.state = state_t'(y);
    rsp_data.succ.accepting = (n != 0) && accepting(kind, m, y);
    rsp_data.none      = (n == 0);
    rsp_data.last      = (n == 0) || (k == n - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; s <= 0; k <= 0; n <= 0; wait_cnt <= 0; n_req <= 0;
    end else if (!busy) begin
      if (req_valid) begin
        busy     <= 1'b1;
        s        <= int'(req_data.state);
        k        <= 0;
        n        <= nsucc(kind, m, int'(req_data.state));
        wait_cnt <= LAT;
        n_req    <= n_req + 1;
      end
    end else if (wait_cnt != 0) begin
      wait_cnt <= wait_cnt - 1;
    end else if (rsp_ready) begin
      if (rsp_data.last) busy <= 1'b0;
      else k <= k + 1;
    end
  end
endmodule
