// Known Set of a reachability core: a Bloom filter over composite states.
//
// Every state offered on "in" is tested against the filter and inserted in
// the same operation; only states the filter had not seen leave on "out",
// duplicates are dropped. Because the filter is probabilistic, a fresh state
// can be mistaken for a visited one; this prunes the search, and with a
// different seed per task different parts of the state space are pruned.
//
// Organisation: N_HASH partitioned banks, each of 2**AW bits held as words of
// WORD_W bits. Bank k is addressed by a seeded hash of the state with seed k.
// An operation takes two cycles: the words are read on the edge that accepts
// the state, then tested and written back with the bits set. A new state is
// then held in an output register until taken. "clear" starts a sequential
// pass that writes zero to every word of every bank (2**AW / WORD_W cycles);
// "ready" is low during it and "in_ready" stays low.
//
// The Bloom filter, its address width AW (19 for the prefix core and 12 for
// the cycle core in the evaluated configuration) and the sequential zeroing
// follow the design. The number of hash functions, the word width, the hash
// mix and the two-cycle operation are this implementation's choices.
module known_set
  import dolmen_pkg::*;
#(
  parameter int AW     = 19,
  parameter int N_HASH_P = N_HASH,
  parameter int WORD_W = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  output logic    ready,
  input  seed_t   seeds [N_HASH_P],
  input  logic    in_valid,
  output logic    in_ready,
  input  cstate_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output cstate_t out_data,
  output logic    idle
);
  localparam int BW = $clog2(WORD_W);      // bit-in-word index width
  localparam int WA = AW - BW;             // word address width
  localparam int NW = 1 << WA;             // words per bank

  typedef enum logic [1:0] {K_CLEAR, K_IDLE, K_TEST} kstate_e;
  kstate_e st;

  logic [WA-1:0]     clr_addr;
  logic [WA-1:0]     waddr_q [N_HASH_P];
  logic [BW-1:0]     bit_q   [N_HASH_P];
  logic [WORD_W-1:0] rword_q [N_HASH_P];
  logic [WA-1:0]     haddr   [N_HASH_P];
  logic [BW-1:0]     hbit    [N_HASH_P];
  cstate_t           data_q;
  logic              is_new;
  logic              accept;

  always_comb begin
    for (int k = 0; k < N_HASH_P; k++) begin
      logic [31:0] h;
      h = state_hash(in_data.state, seeds[k]);
      haddr[k] = h[AW-1:BW];
      hbit[k]  = h[BW-1:0];
    end
  end

  always_comb begin
    is_new = 1'b0;
    for (int k = 0; k < N_HASH_P; k++)
      if (!rword_q[k][bit_q[k]]) is_new = 1'b1;
  end

  assign ready    = (st != K_CLEAR);
  assign in_ready = (st == K_IDLE) && (!out_valid || out_ready);
  assign accept   = in_valid && in_ready;
  assign idle     = (st != K_TEST) && !out_valid;

  for (genvar k = 0; k < N_HASH_P; k++) begin : g_bank
    logic [WORD_W-1:0] mem [NW];
    always_ff @(posedge clk) begin
      if (st == K_CLEAR)
        mem[clr_addr] <= '0;
      else if (st == K_TEST)
        mem[waddr_q[k]] <= rword_q[k] | (WORD_W'(1) << bit_q[k]);
      if (accept) begin
        rword_q[k] <= mem[haddr[k]];
        waddr_q[k] <= haddr[k];
        bit_q[k]   <= hbit[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= K_CLEAR;
      clr_addr  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      data_q    <= '0;
    end else if (clear) begin
      st        <= K_CLEAR;
      clr_addr  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (st)
        K_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == WA'(NW - 1)) st <= K_IDLE;
        end
        K_IDLE: if (accept) begin
          data_q <= in_data;
          st     <= K_TEST;
        end
        K_TEST: begin
          if (is_new) begin
            out_valid <= 1'b1;
            out_data  <= data_q;
          end
          st <= K_IDLE;
        end
        default: st <= K_CLEAR;
      endcase
    end
  end
endmodule
