// VCore controller: task-level control of one verification core.
//
// Connects the core to the distribution tree. A start order (down.start)
// carries the maximum number of verification tasks (VTasks) and a run epoch.
// For every task the controller draws N_HASH fresh hash seeds from its LFSR,
// clears both reachability cores, waits until both are ready and starts the
// prefix core. A task ends when the prefix core drains without an acceptance
// cycle ("pfx_done"); the controller then starts the next task, until
// max_tasks have run and it reports "ended". When the cycle core finds a
// cycle ("cyc_found") the controller reports "found" with the accepting
// state and stops. A new start order aborts whatever runs. The status sent
// up (up) is a register; its epoch tells which start order it answers.
//
// The LFSR is loaded with CORE_INDEX + 1 at reset, so each core draws its
// own seed sequence; the design loads it with the core index, and the +1
// keeps index 0 from locking the register at zero. Seed drawing per task,
// the abort-on-start rule and the epoch are this implementation's choices.
module vcore_controller
  import dolmen_pkg::*;
#(
  parameter int CORE_INDEX = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  down_msg_t down,
  output up_msg_t   up,
  output seed_t     seeds [N_HASH],
  output logic      core_clear,
  input  logic      pfx_ready,
  input  logic      cyc_ready,
  output logic      pfx_start,
  input  logic      pfx_done,
  input  logic      cyc_found,
  input  state_t    cyc_state
);
  typedef enum logic [2:0] {C_IDLE, C_SEED, C_CLEAR, C_WAIT, C_RUN} cstate_e;
  cstate_e st;

  localparam int SCW = (N_HASH > 1) ? $clog2(N_HASH) : 1;

  logic [TASK_W-1:0] max_q;
  logic [TASK_W-1:0] tasks_run;
  logic [SCW-1:0]    seed_cnt;
  logic                      lfsr_load, lfsr_step;
  seed_t                     lfsr_val;

  seed_lfsr #(.W(SEED_W)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .init(SEED_W'(CORE_INDEX + 1)),
    .step(lfsr_step), .value(lfsr_val)
  );

  assign lfsr_step  = (st == C_SEED);
  assign core_clear = (st == C_CLEAR);
  assign pfx_start  = (st == C_WAIT) && pfx_ready && cyc_ready;

  // Load the core index once after reset.
  logic loaded;
  assign lfsr_load = !loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      loaded    <= 1'b0;
      max_q     <= '0;
      tasks_run <= '0;
      seed_cnt  <= '0;
      up        <= '0;
      for (int k = 0; k < N_HASH; k++) seeds[k] <= '0;
    end else begin
      loaded <= 1'b1;
      if (down.start) begin
        max_q     <= down.max_tasks;
        tasks_run <= '0;
        up        <= '{ended: 1'b0, found: 1'b0, epoch: down.epoch, state: '0};
        seed_cnt  <= '0;
        st        <= (down.max_tasks == '0) ? C_IDLE : C_SEED;
        if (down.max_tasks == '0) up.ended <= 1'b1;
      end else begin
        unique case (st)
          C_IDLE: ;
          C_SEED: begin
            // lfsr_step is high: take the value before it advances.
            seeds[seed_cnt] <= lfsr_val;
            seed_cnt        <= seed_cnt + 1'b1;
            if (seed_cnt == SCW'(N_HASH - 1)) st <= C_CLEAR;
          end
          C_CLEAR: st <= C_WAIT;
          C_WAIT:  if (pfx_ready && cyc_ready) st <= C_RUN;
          C_RUN: begin
            if (cyc_found) begin
              up.found <= 1'b1;
              up.state <= cyc_state;
              st       <= C_IDLE;
            end else if (pfx_done) begin
              tasks_run <= tasks_run + 1'b1;
              seed_cnt  <= '0;
              if (tasks_run + 1'b1 >= max_q) begin
                up.ended <= 1'b1;
                st       <= C_IDLE;
              end else begin
                st <= C_SEED;
              end
            end
          end
          default: st <= C_IDLE;
        endcase
      end
    end
  end
endmodule
