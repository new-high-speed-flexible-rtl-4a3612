// turbo_ref_pkg: reference models shared by the testbenches.
//
// - ref_rsc_step: the {13,15} RSC code written from its polynomials as a plain
//   shift register (feedback taps D^2, D^3; parity taps 1, D, D^3).
// - make_pattern: a random interleaver for a block of L bits that keeps every bit
//   at the same position modulo 7: the positions of each residue class are
//   shuffled among themselves.
// - ref_encode: the transmitted symbol sequence of one block (data, tail bits,
//   zero padding, interleaved pass, puncturing), computed without the RTL.
// - gauss: an approximately Gaussian sample (sum of 12 uniforms).
package turbo_ref_pkg;
  import turbo_pkg::*;

  typedef struct {
    bit        b;
    sym_kind_t k;
  } sym_t;

  // reg[0] = newest register value; returns parity, updates reg
  function automatic bit ref_rsc_step(ref bit r[3], input bit u);
    bit a, c;
    a = u ^ r[1] ^ r[2];          // 1 + D^2 + D^3
    c = a ^ r[0] ^ r[2];          // 1 + D + D^3
    r[2] = r[1]; r[1] = r[0]; r[0] = a;
    return c;
  endfunction

  function automatic void make_pattern(input int l, output int pi[]);
    int cls[7][$];
    pi = new[l];
    for (int t = 0; t < l; t++) cls[t % 7].push_back(t);
    for (int k = 0; k < 7; k++)
      for (int i = cls[k].size() - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(i, 0);
        tmp = cls[k][i]; cls[k][i] = cls[k][j]; cls[k][j] = tmp;
      end
    for (int p = 0; p < l; p++) pi[p] = cls[p % 7].pop_front();
  endfunction

  function automatic bit keep(input punct_cfg_t c, input bit second, input int i);
    int ph;
    ph = i % (int'(c.period_m1) + 1);
    return second ? c.y2_mask[ph] : c.y1_mask[ph];
  endfunction

  // Encode one block. Returns the symbols, the coded bits x (data + tail),
  // parities y1, y2, the number of zero bits and the final state of each pass.
  function automatic void ref_encode(input bit d[], input int pi[], input punct_cfg_t c,
                                     output sym_t s[$], output bit x[], output bit y1[],
                                     output bit y2[], output int n0, output bit ok1,
                                     output bit ok2);
    bit r[3];
    int n, l;
    n = d.size(); l = n + 3;
    x = new[l]; y1 = new[l]; y2 = new[l];
    s.delete();
    r = '{0, 0, 0};
    for (int t = 0; t < l; t++) begin
      bit u;
      u = (t < n) ? d[t] : (r[1] ^ r[2]);
      x[t]  = u;
      y1[t] = ref_rsc_step(r, u);
      s.push_back('{u, SYM_X});
      if (keep(c, 0, t)) s.push_back('{y1[t], SYM_Y1});
    end
    ok1 = (r == '{0, 0, 0});
    n0 = 0;
    while ((l + n0) % 7 != 0) begin
      void'(ref_rsc_step(r, 1'b0));
      n0++;
    end
    for (int p = 0; p < l; p++) begin
      y2[p] = ref_rsc_step(r, x[pi[p]]);
      if (keep(c, 1, p)) s.push_back('{y2[p], SYM_Y2});
    end
    ok2 = (r == '{0, 0, 0});
  endfunction

  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(1000000, 0)) / 1000000.0;
    return acc - 6.0;
  endfunction

  // Soft value of a coded bit: +amp for one, -amp for zero, plus noise, rounded
  // and clipped to a signed w-bit number.
  function automatic int soft_value(input bit b, input real amp, input real sigma, input int w);
    real v;
    int q, lim;
    v = (b ? amp : -amp) + sigma * gauss();
    q = int'(v);
    lim = (1 << (w - 1)) - 1;
    if (q > lim) q = lim;
    if (q < -lim) q = -lim;
    return q;
  endfunction

endpackage
