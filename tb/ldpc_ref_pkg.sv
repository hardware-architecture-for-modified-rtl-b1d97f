// ldpc_ref_pkg: reference model used by the testbenches.
//
// Written independently of the RTL: plain integer arithmetic on signed soft
// values, the f-function correction table derived from ln/exp at run time,
// the code's permutations recomputed from their polynomials, an encoder and a
// bit-exact software model of the decoder's schedule working on natural
// indices, plus a channel model that produces quantised soft values.
package ldpc_ref_pkg;

  localparam int NR = 256;
  localparam int NB = 1024;

  function automatic int sat(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic int from_sm(logic [4:0] v);
    return v[4] ? -int'(v[3:0]) : int'(v[3:0]);
  endfunction

  function automatic logic [4:0] to_sm(int v);
    return (v < 0) ? {1'b1, 4'(-v)} : {1'b0, 4'(v)};
  endfunction

  function automatic int corr8(int d);
    return int'($floor(8.0 * $ln(1.0 + $exp(-real'(d) / 2.0)) + 0.5));
  endfunction

  // f-function on signed indices
  function automatic int f(int a, int b);
    int ma, mb, m;
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    m  = (8 * ((ma < mb) ? ma : mb) - corr8((ma > mb) ? ma - mb : mb - ma) + corr8(ma + mb));
    m  = (m < 0) ? 0 : m / 8;
    return (((a < 0) != (b < 0)) ? -m : m);
  endfunction

  // exact box-plus of two indices (step 0.5), in index units
  function automatic real boxplus(int a, int b);
    real ta, tb;
    ta = $tanh(real'(a) / 4.0);
    tb = $tanh(real'(b) / 4.0);
    return 4.0 * $atanh(ta * tb);
  endfunction

  function automatic int add(int a, int b);  return sat(a + b, 15); endfunction
  function automatic int cadd(int a, int b); return sat(a + b, 7);  endfunction
  function automatic int sub(int a, int b);  return sat(a - b, 15); endfunction

  // natural bit index of position i of dimension k
  function automatic int P(int k, int i);
    longint c1, c2;
    case (k)
      1: begin c1 = 31;  c2 = 64;  end
      2: begin c1 = 127; c2 = 288; end
      3: begin c1 = 63;  c2 = 160; end
      default: return i;
    endcase
    return int'((c1 * i + c2 * longint'(i) * i) % longint'(NB));
  endfunction

  typedef int  soft_t [NB];
  typedef int  par_t  [4][NR];
  typedef bit  bits_t [NB];
  typedef bit  pbits_t [4][NR];

  // zigzag parity of each dimension: p_r = p_{r-1} ^ d(row r)
  function automatic pbits_t encode(bits_t d);
    pbits_t p;
    for (int k = 0; k < 4; k++) begin
      bit acc = 0;
      for (int r = 0; r < NR; r++) begin
        for (int c = 0; c < 4; c++) acc ^= d[P(k, 4 * r + c)];
        p[k][r] = acc;
      end
    end
    return p;
  endfunction

  // statistics of one reference decode
  typedef struct {
    int clips;      // extrinsic values limited to +/-7
    int sats;       // additions that hit +/-15
  } stats_t;

  // bit-exact model of the decoder: iters processing iterations
  function automatic bits_t decode(soft_t ch, par_t pr, int iters, output stats_t st);
    int q [NB];
    int e [4][NB];
    int x [4], tmp [4];
    int fw [NR], dd [NR];
    int xs [NR][4], ts [NR][4];
    int p01, p23, a, v, t, ft, en;
    bits_t hd;
    st = '{0, 0};
    for (int n = 0; n < NB; n++) q[n] = ch[n];
    for (int k = 0; k < 4; k++) for (int n = 0; n < NB; n++) e[k][n] = 0;
    for (int it = 0; it < iters; it++)
      for (int k = 0; k < 4; k++) begin
        for (int r = 0; r < NR; r++) begin
          for (int c = 0; c < 4; c++) x[c] = sub(q[P(k, 4*r+c)], e[k][P(k, 4*r+c)]);
          p01 = f(x[0], x[1]);
          p23 = f(x[2], x[3]);
          dd[r] = f(p01, p23);
          tmp[0] = f(x[1], p23); tmp[1] = f(x[0], p23);
          tmp[2] = f(p01, x[3]); tmp[3] = f(p01, x[2]);
          if (r == 0) fw[r] = add(pr[k][r], dd[r]);
          else        fw[r] = add(pr[k][r], f(dd[r], fw[r-1]));
          for (int c = 0; c < 4; c++) begin xs[r][c] = x[c]; ts[r][c] = tmp[c]; end
        end
        t = 0;
        for (int r = NR - 1; r >= 0; r--) begin
          if (r == NR - 1) a = pr[k][r];
          else begin
            if (pr[k][r] + t > 15 || pr[k][r] + t < -15) st.sats++;
            a = add(pr[k][r], t);
          end
          v = (r == 0) ? a : f(fw[r-1], a);
          for (int c = 0; c < 4; c++) begin
            ft = f(ts[r][c], v);
            if (ft > 7 || ft < -7) st.clips++;
            en = cadd(ft, 0);
            if (xs[r][c] + en > 15 || xs[r][c] + en < -15) st.sats++;
            q[P(k, 4*r+c)] = add(xs[r][c], en);
            // the stored extrinsic value is the change actually applied
            e[k][P(k, 4*r+c)] = q[P(k, 4*r+c)] - xs[r][c];
          end
          t = f(dd[r], a);
        end
      end
    for (int n = 0; n < NB; n++) hd[n] = (q[n] < 0);
    return hd;
  endfunction

  // approximately Gaussian sample, mean 0, variance 1
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // quantised channel value for bit b: mean +/-mu, deviation sigma (index units)
  function automatic int channel(bit b, real mu, real sigma);
    real y;
    y = (b ? -mu : mu) + sigma * gauss();
    return sat(int'($floor(y + 0.5)), 15);
  endfunction

endpackage
