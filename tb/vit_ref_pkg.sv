// vit_ref_pkg: behavioural reference models used by the testbenches.
//
// ref_encode: bit-serial rate-1/2 encoder written from the generator
// polynomials, register {u, D1 .. D(K-1)}.
// ref_decode: a straightforward software Viterbi decoder on integer path
// metrics that follows the same blocking rules as the hardware: blocks of
// TL symbols (or fewer, ended by a last flag), traceback of each block from
// the lowest-numbered state with the smallest metric, ties in the
// compare resolved towards the predecessor whose oldest bit is 0, metrics
// carried across blocks and restarted (0 for state 0, INIT elsewhere) after
// a last flag.
package vit_ref_pkg;

  typedef bit [1:0] sym_q_t[$];
  typedef bit       bit_q_t[$];

  function automatic bit parity(input int unsigned v);
    bit p = 0;
    for (int i = 0; i < 32; i++) p ^= v[i];
    return p;
  endfunction

  function automatic bit [1:0] ref_symbol(input int k, input int g1, input int g0,
                                          input int s, input bit u);
    int unsigned r = (int'(u) << (k - 1)) | s;
    return {parity(r & g1), parity(r & g0)};
  endfunction

  // Encode a message from state 0.
  function automatic sym_q_t ref_encode(input int k, input int g1, input int g0,
                                        input bit_q_t msg);
    sym_q_t q;
    int s = 0;
    foreach (msg[i]) begin
      q.push_back(ref_symbol(k, g1, g0, s, msg[i]));
      s = (int'(msg[i]) << (k - 2)) | (s >> 1);
    end
    return q;
  endfunction

  // Decode a stream of symbols; lasts[i] marks the end of a message.
  function automatic bit_q_t ref_decode(input int k, input int g1, input int g0,
                                        input int tl, input int init,
                                        input sym_q_t syms, input bit_q_t lasts);
    int ns_n = 1 << (k - 1);
    int pm[]; int npm[];
    bit dec[][];
    bit_q_t out;
    int t = 0;
    pm = new[ns_n]; npm = new[ns_n];
    dec = new[tl];
    foreach (dec[i]) dec[i] = new[ns_n];
    for (int s = 0; s < ns_n; s++) pm[s] = (s == 0) ? 0 : init;
    foreach (syms[i]) begin
      int best, bestm;
      for (int ns = 0; ns < ns_n; ns++) begin
        bit u = ns[k-2];
        int p0 = (ns << 1) & (ns_n - 1);
        int p1 = p0 + 1;
        bit [1:0] e0 = ref_symbol(k, g1, g0, p0, u);
        bit [1:0] e1 = ref_symbol(k, g1, g0, p1, u);
        int m0 = pm[p0] + int'(e0[1] != syms[i][1]) + int'(e0[0] != syms[i][0]);
        int m1 = pm[p1] + int'(e1[1] != syms[i][1]) + int'(e1[0] != syms[i][0]);
        dec[t][ns] = (m1 < m0);
        npm[ns] = (m1 < m0) ? m1 : m0;
      end
      best = 0; bestm = npm[0];
      for (int s = 1; s < ns_n; s++) if (npm[s] < bestm) begin best = s; bestm = npm[s]; end
      pm = npm;
      if (t == tl - 1 || lasts[i]) begin
        bit blk[$];
        int s = best;
        for (int j = t; j >= 0; j--) begin
          blk.push_front(s[k-2]);
          s = ((s << 1) & (ns_n - 1)) | int'(dec[j][s]);
        end
        foreach (blk[j]) out.push_back(blk[j]);
        t = 0;
        if (lasts[i]) for (int s2 = 0; s2 < ns_n; s2++) pm[s2] = (s2 == 0) ? 0 : init;
      end else begin
        t++;
      end
    end
    return out;
  endfunction

endpackage
