// ewf_ref_model: behavioural reference of one iteration of the fifth-order
// wave digital elliptic filter, written directly as the 34 equations of the
// filter's data-flow graph (op numbers in comments). It knows nothing of the
// schedule table, the register assignment or the control words of the RTL,
// so the testbenches can compare the datapath against it. Arithmetic is the
// RTL's: W-bit two's complement, wrap-around, multiplication by a fixed-point
// coefficient with FRAC fraction bits and arithmetic right shift.
// The model keeps the filter state (dat1..dat7, starting at zero, as the
// datapath does after reset); a testbench instantiates it and calls
// iterate() once per sample, in sample order.
module ewf_ref_model #(
  parameter int W    = 16,
  parameter int FRAC = 14,
  parameter int COEFS [8] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120}
);
  typedef struct {
    int state [1:7];   // dat1..dat7
  } ewf_state_t;

  ewf_state_t st = '{state: '{default: 0}};

  function automatic int wrap(int v, int w);
    longint m;
    m = longint'(v) & ((longint'(1) << w) - 1);
    if (m >= (longint'(1) << (w - 1))) m -= (longint'(1) << w);
    return int'(m);
  endfunction

  function automatic int mul(int x, int c, int w, int frac);
    longint p;
    p = longint'(x) * longint'(c);
    return wrap(int'(p >>> frac), w);
  endfunction

  // One iteration: consumes inp, updates the state, returns the output.
  function automatic int iterate(int inp);
    int w, frac;
    int coefs [8];
    int a, b, c, d, e, f, g, h, i, j, k, l, m, n, o, p, q, r, s, t, u, v, x, y, z;
    int alpha, beta, gamma, d1, d2, d5, d6, d7;
    w = W; frac = FRAC; coefs = COEFS;
    a = wrap(inp + st.state[1], w);          // 1
    b = wrap(a + st.state[2], w);            // 2
    d = wrap(st.state[6] + st.state[7], w);  // 3
    c = wrap(b + st.state[3], w);            // 4
    e = wrap(c + d, w);                      // 5
    f = mul(e, coefs[0], w, frac);           // 6
    g = wrap(f + b, w);                      // 7
    s = mul(e, coefs[1], w, frac);           // 8
    h = wrap(g + b, w);                      // 9
    t = wrap(s + d, w);                      // 10
    i = mul(h, coefs[2], w, frac);           // 11
    u = wrap(t + d, w);                      // 12
    j = wrap(i + a, w);                      // 13
    r = wrap(g + e, w);                      // 14
    v = mul(u, coefs[3], w, frac);           // 15
    k = wrap(j + a, w);                      // 16
    n = wrap(j + g, w);                      // 17
    x = 0;
    begin : blk_w
      int ww;
      ww = wrap(v + st.state[7], w);         // 18
      l = mul(k, coefs[4], w, frac);         // 19
      o = wrap(n + st.state[4], w);          // 20
      x = wrap(ww + t, w);                   // 21
      alpha = wrap(ww + st.state[7], w);     // 22
      m = wrap(l + inp, w);                  // 23
      p = mul(o, coefs[5], w, frac);         // 24
      y = wrap(x + st.state[5], w);          // 25
      d1 = wrap(m + j, w);                   // 26
      q = wrap(p + st.state[4], w);          // 27
      z = mul(y, coefs[6], w, frac);         // 28
      d2 = wrap(q + o, w);                   // 29
      beta = wrap(z + st.state[5], w);       // 31
      gamma = mul(alpha, coefs[7], w, frac); // 32
      d5 = wrap(r + t, w);                   // 30
      d6 = wrap(beta + y, w);                // 33
      d7 = wrap(gamma + ww, w);              // 34
    end
    st.state[1] = d1;
    st.state[2] = d2;
    st.state[3] = q;
    st.state[4] = beta;
    st.state[5] = d5;
    st.state[6] = d6;
    st.state[7] = d7;
    return gamma;
  endfunction
endmodule
