// Toy models for the testbenches: a state space of M composite states,
// numbered 0 .. M-1, with at most two successors each. They stand in for the
// generated next-state generator and Buchi property of a real model.
//   kind 0 (lasso)  : s -> (s+1) mod M, (3s+7) mod M; accepting when
//                     s mod 13 = 5. Every state lies on the ring, so every
//                     reachable accepting state closes an acceptance cycle.
//   kind 1 (acyclic): s -> s+1, s+2 (below M); accepting when s mod 7 = 3.
//                     No cycles, so the property holds.
//   kind 2 (single) : s -> (s+1) mod M, (s+2) mod M; only M/2 accepting.
//   kind 3, 4 (bakery): Lamport's bakery mutual exclusion for two processes
//                     under interleaving, composed with a two-state Buchi
//                     automaton for the negation of "when process 0 waits it
//                     eventually enters its critical section". Kind 3 counts
//                     process 0 as waiting from the moment it asks (pc 1..4),
//                     which an unfair schedule can starve; kind 4 only once
//                     it holds a ticket (pc 3..4), which the algorithm
//                     guarantees. M is ignored for these kinds.
//                     State bits: pc0 [2:0], pc1 [5:3], choosing [7:6],
//                     number0 [10:8], number1 [13:11], property state [14].
//                     pc: 0 idle, 1 asks, 2 takes ticket, 3 waits for the
//                     other's choice, 4 waits for its turn, 5 critical.
package tb_model_pkg;
  localparam int MAX_M = 32768;

  // One step of process i of the bakery system, or -1 if it is blocked.
  function automatic int bakery_step(int s, int i);
    int pc, j, chj, ni, nj, mx, r;
    j  = 1 - i;
    pc = (s >> (3 * i)) & 7;
    chj = (s >> (6 + j)) & 1;
    ni = (s >> (8 + 3 * i)) & 7;
    nj = (s >> (8 + 3 * j)) & 7;
    r  = s & ~(7 << (3 * i));
    case (pc)
      0: return r | (1 << (3 * i));
      1: begin
        mx = (ni > nj) ? ni : nj;
        if (mx + 1 > 7) return -1;
        r = (r | (2 << (3 * i)) | (1 << (6 + i))) & ~(7 << (8 + 3 * i));
        return r | ((mx + 1) << (8 + 3 * i));
      end
      2: return (r | (3 << (3 * i))) & ~(1 << (6 + i));
      3: return (chj == 0) ? (r | (4 << (3 * i))) : -1;
      4: return (nj == 0 || nj > ni || (nj == ni && j > i)) ? (r | (5 << (3 * i))) : -1;
      default: return r & ~(7 << (8 + 3 * i));
    endcase
  endfunction

  function automatic bit bakery_waiting(int kind, int s);
    int pc;
    pc = s & 7;
    return (kind == 3) ? (pc >= 1 && pc <= 4) : (pc >= 3 && pc <= 4);
  endfunction

  // Successors of the product of the bakery system and the property automaton.
  function automatic void bakery_succ(int kind, int s, ref int out [$]);
    out.delete();
    for (int i = 0; i < 2; i++) begin
      int t;
      t = bakery_step(s & 16'h3FFF, i);
      if (t >= 0) begin
        if (((s >> 14) & 1) == 0) begin
          out.push_back(t);
          if (bakery_waiting(kind, t)) out.push_back(t | (1 << 14));
        end else if ((t & 7) != 5) begin
          out.push_back(t | (1 << 14));
        end
      end
    end
  endfunction

  function automatic int nsucc(int kind, int m, int s);
    int l [$];
    if (kind >= 3) begin bakery_succ(kind, s, l); return l.size(); end
    case (kind)
      0: return (((s + 1) % m) == ((3 * s + 7) % m)) ? 1 : 2;
      1: return (s + 2 < m) ? 2 : ((s + 1 < m) ? 1 : 0);
      default: return (m > 2) ? 2 : 1;
    endcase
  endfunction

  function automatic int succ(int kind, int m, int s, int k);
    int l [$];
    if (kind >= 3) begin bakery_succ(kind, s, l); return l[k]; end
    case (kind)
      0: return (k == 0) ? (s + 1) % m : (3 * s + 7) % m;
      1: return s + 1 + k;
      default: return (s + 1 + k) % m;
    endcase
  endfunction

  function automatic bit accepting(int kind, int m, int s);
    case (kind)
      0: return (s % 13) == 5;
      1: return (s % 7) == 3;
      3, 4: return ((s >> 14) & 1) == 1;
      default: return s == m / 2;
    endcase
  endfunction

  // Is s reachable from one of its own successors (breadth-first search)?
  function automatic bit on_cycle(int kind, int m, int s);
    bit seen [MAX_M];
    int q [$];
    for (int k = 0; k < nsucc(kind, m, s); k++) q.push_back(succ(kind, m, s, k));
    while (q.size() > 0) begin
      int x;
      x = q.pop_front();
      if (x == s) return 1'b1;
      if (!seen[x]) begin
        seen[x] = 1'b1;
        for (int k = 0; k < nsucc(kind, m, x); k++) q.push_back(succ(kind, m, x, k));
      end
    end
    return 1'b0;
  endfunction

  // Number of accepting states reachable from state 0.
  function automatic int n_reach_accepting(int kind, int m);
    bit seen [MAX_M];
    int q [$];
    int n;
    n = 0;
    q.push_back(0);
    seen[0] = 1'b1;
    while (q.size() > 0) begin
      int x;
      x = q.pop_front();
      if (accepting(kind, m, x)) n++;
      for (int k = 0; k < nsucc(kind, m, x); k++) begin
        int y;
        y = succ(kind, m, x, k);
        if (!seen[y]) begin
          seen[y] = 1'b1;
          q.push_back(y);
        end
      end
    end
    return n;
  endfunction

  // Does some reachable accepting state lie on a cycle? (Exhaustive check.)
  function automatic bit exists_acc_cycle(int kind, int m, output int n_states);
    bit seen [MAX_M];
    int q [$], acc [$];
    q.push_back(0);
    seen[0] = 1'b1;
    n_states = 0;
    while (q.size() > 0) begin
      int x;
      x = q.pop_front();
      n_states++;
      if (accepting(kind, m, x)) acc.push_back(x);
      for (int k = 0; k < nsucc(kind, m, x); k++) begin
        int y;
        y = succ(kind, m, x, k);
        if (!seen[y]) begin seen[y] = 1'b1; q.push_back(y); end
      end
    end
    foreach (acc[i]) if (on_cycle(kind, m, acc[i])) return 1'b1;
    return 1'b0;
  endfunction
endpackage
