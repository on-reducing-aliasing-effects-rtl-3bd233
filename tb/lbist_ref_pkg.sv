// lbist_ref_pkg: reference model of a logic BIST session, for testbenches.
//
// lbist_ref#(N, L) replays a session clock by clock in plain procedural code:
// an N-bit pattern generator (state multiplied by x modulo p(x) per shift),
// N scan chains of L cells loaded one generator bit each, a capture through a
// stand-in for the logic under test, and an N-bit signature register.  It
// records the serial output of the signature register after every clock, and
// for diagnosis sessions a tag telling which vector and which cell of the
// selected chain each serial output bit came from.
//
// The stand-in logic (resp) is a fixed mix of rotations and ANDs of all scan
// cells.  A fault is modelled as a mask of scan cells whose captured value is
// inverted at vector fault_first, and again every fault_period vectors after it
// (never again when fault_period is 0).
package lbist_ref_pkg;

  class lbist_ref #(int N = 8, int L = 6);
    typedef logic [N-1:0][L-1:0] cells_t;
    typedef logic [N*L-1:0]      flat_t;

    logic [N-1:0] poly, seed;
    // results of the last run()
    bit           so_q[$];
    int           tag_vec_q[$];
    int           tag_cell_q[$];
    logic [N-1:0] final_sig;
    // model state
    logic [N-1:0] prpg, misr;
    flat_t        chains;   // chain i cell j at bit i*L+j
    int           length;

    function new(logic [N-1:0] poly_i, logic [N-1:0] seed_i);
      poly = poly_i;
      seed = seed_i;
    endfunction

    // fault-free response of the logic under test
    static function cells_t good_resp(cells_t c);
      flat_t f, r;
      f = flat_t'(c);
      r = {f[N*L-2:0], f[N*L-1]} ^ (f & {f[2:0], f[N*L-1:3]}) ^ ~{f[N*L-6:0], f[N*L-1:N*L-5]};
      return cells_t'(r);
    endfunction

    static function bit fault_active(int vec, int first, int period);
      if (first <= 0 || vec < first) return 1'b0;
      if (vec == first) return 1'b1;
      return (period > 0) && ((vec - first) % period == 0);
    endfunction

    static function cells_t resp(cells_t c, int vec, cells_t mask, int first, int period);
      return good_resp(c) ^ (fault_active(vec, first, period) ? mask : cells_t'(0));
    endfunction

    // One session of nvec vectors.  diag_chain < 0: all chains reach the MISR,
    // otherwise only that chain.  d = 1 removes the MISR feedback.
    function void run(int nvec, int diag_chain, bit d, cells_t mask, int first, int period,
                      bit keep_stream);
      logic [N-1:0] in;
      logic [N:0]   t;
      int           tv[N], tc[N];
      int           nshift;
      so_q.delete();
      tag_vec_q.delete();
      tag_cell_q.delete();
      prpg   = seed;
      misr   = '0;
      chains = '0;
      length = 0;
      for (int i = 0; i < N; i++) begin
        tv[i] = -1;
        tc[i] = -1;
      end
      for (int x = 0; x <= nvec; x++) begin
        if (x > 0) begin
          // capture clock
          chains = flat_t'(resp(cells_t'(chains), x, mask, first, period));
          record(misr, tv[N-1], tc[N-1], keep_stream);
        end
        nshift = (x == nvec) ? L + N - 1 : L;
        for (int s = 0; s < nshift; s++) begin
          if (x > 0) begin
            for (int i = 0; i < N; i++) begin
              in[i] = (diag_chain < 0 || diag_chain == i) ? chains[i*L+L-1] : 1'b0;
            end
            t = {misr, 1'b0};
            if (t[N] && !d) t = t ^ {1'b1, poly};
            misr = t[N-1:0] ^ in;
            for (int i = N - 1; i > 0; i--) begin
              tv[i] = tv[i-1];
              tc[i] = tc[i-1];
            end
            tv[0] = -1;
            tc[0] = -1;
            if (diag_chain >= 0) begin
              tv[diag_chain] = (s < L) ? x : -1;
              tc[diag_chain] = (s < L) ? L - 1 - s : -1;
            end
          end
          for (int i = 0; i < N; i++) begin
            chains[i*L +: L] = {chains[i*L +: L-1], prpg[i]};
          end
          t = {prpg, 1'b0};
          if (t[N]) t = t ^ {1'b1, poly};
          prpg = t[N-1:0];
          record(misr, tv[N-1], tc[N-1], keep_stream);
        end
      end
    endfunction

    // one clock done: misr_now is the register after it
    function void record(logic [N-1:0] misr_now, int v, int c, bit keep);
      length++;
      final_sig = misr_now;
      if (keep) begin
        so_q.push_back(misr_now[N-1]);
        tag_vec_q.push_back(v);
        tag_cell_q.push_back(c);
      end
    endfunction
  endclass

endpackage
