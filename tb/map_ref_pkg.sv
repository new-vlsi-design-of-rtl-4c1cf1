// map_ref_pkg: behavioural reference for the decoder testbenches.
//
// Written independently of the RTL: the trellis comes from the encoder
// equations (feedback a = d ^ M1 ^ M2, parity = a ^ M2, next state (a, M1)),
// the a priori table from ln/exp in real arithmetic, and every metric is a
// plain int clamped to [-128, 127] after each addition, in the same order of
// operations as the hardware (so results are expected to match bit for bit).
// Also holds a rate-1/2 (7,5) RSC encoder with trellis termination and a
// Gaussian-like noise source for making test frames.
package map_ref_pkg;

  int unsigned clamp_hits;   // how often a clamp changed a value

  function automatic int clamp8(int v);
    if (v > 127)  begin clamp_hits++; return 127;  end
    if (v < -128) begin clamp_hits++; return -128; end
    return v;
  endfunction

  // Next state and parity bit of the encoder; state = {M1, M2}.
  function automatic int next_state(int s, int d);
    int m1, m2, a;
    m1 = (s >> 1) & 1;
    m2 = s & 1;
    a  = d ^ m1 ^ m2;
    return (a << 1) | m1;
  endfunction

  function automatic int parity(int s, int d);
    int m1, m2, a;
    m1 = (s >> 1) & 1;
    m2 = s & 1;
    a  = d ^ m1 ^ m2;
    return a ^ m2;
  endfunction

  // Integer channel sum for a branch label, from Q(frac) samples.
  function automatic int chan_sum(int yd, int yp, int xs, int xp, int frac);
    real v;
    v = ((xs ? 1.0 : -1.0) * yd + (xp ? 1.0 : -1.0) * yp) / real'(1 << frac);
    return int'($floor(v + 0.5));
  endfunction

  // Rounded ln AP(+1) (plus=1) or ln AP(-1) (plus=0) for an integer APP.
  function automatic int ln_ap(int app, int plus);
    real k;
    if (app > 8)  app = 8;
    if (app < -8) app = -8;
    k = real'(app);
    if (plus) return -int'($floor($ln(1.0 + $exp(-k)) + 0.5));
    else      return -int'($floor($ln(1.0 + $exp(k)) + 0.5));
  endfunction

  // Branch metric of a transition from state s with input d.
  function automatic int gamma(int yd, int yp, int app, int s, int d, int frac);
    return clamp8(chan_sum(yd, yp, d, parity(s, d), frac) + ln_ap(app, d));
  endfunction

  // Full Max-Log-MAP decode of one frame; llr[t] for t = 0..n-1.
  function automatic void decode(input int yd[], input int yp[], input int app[],
                                 input int frac, output int llr[]);
    int n;
    int alpha [][4];
    int beta  [][4];
    n = yd.size();
    alpha = new[n + 1];
    beta  = new[n + 1];
    llr   = new[n];
    for (int s = 0; s < 4; s++) begin
      alpha[0][s] = (s == 0) ? 0 : -128;
      beta[n][s]  = (s == 0) ? 0 : -128;
    end
    for (int t = 0; t < n; t++) begin
      int nw [4];
      int mx;
      for (int s = 0; s < 4; s++) nw[s] = -1000;
      for (int s = 0; s < 4; s++)
        for (int d = 0; d < 2; d++) begin
          int ns, v;
          ns = next_state(s, d);
          v  = clamp8(alpha[t][s] + gamma(yd[t], yp[t], app[t], s, d, frac));
          if (v > nw[ns]) nw[ns] = v;
        end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) alpha[t+1][s] = clamp8(nw[s] - mx);
    end
    for (int t = n - 1; t >= 0; t--) begin
      int nw [4];
      int mx, m0, m1;
      m0 = -1000;
      m1 = -1000;
      for (int s = 0; s < 4; s++) begin
        nw[s] = -1000;
        for (int d = 0; d < 2; d++) begin
          int ns, g, v, p;
          ns = next_state(s, d);
          g  = gamma(yd[t], yp[t], app[t], s, d, frac);
          v  = clamp8(beta[t+1][ns] + g);
          if (v > nw[s]) nw[s] = v;
          p  = clamp8(clamp8(alpha[t][s] + beta[t+1][ns]) + g);
          if (d == 1 && p > m1) m1 = p;
          if (d == 0 && p > m0) m0 = p;
        end
      end
      mx = nw[0];
      for (int s = 1; s < 4; s++) if (nw[s] > mx) mx = nw[s];
      for (int s = 0; s < 4; s++) beta[t][s] = clamp8(nw[s] - mx);
      llr[t] = clamp8(m1 - m0);
    end
  endfunction

  // Encode n_info random bits and two termination bits that return the
  // encoder to state 0. Returns the information bits (with tail) in d.
  function automatic void encode(input int n_info, output int d[], output int xp[]);
    int s;
    d  = new[n_info + 2];
    xp = new[n_info + 2];
    s  = 0;
    for (int t = 0; t < n_info + 2; t++) begin
      if (t < n_info) d[t] = int'($urandom_range(1, 0));
      else            d[t] = ((s >> 1) & 1) ^ (s & 1);   // makes the feedback 0
      xp[t] = parity(s, d[t]);
      s     = next_state(s, d[t]);
    end
  endfunction

  // Roughly Gaussian noise with standard deviation sigma (sum of 12 uniforms).
  function automatic real noise(real sigma);
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(65535, 0)) / 65536.0;
    return (acc - 6.0) * sigma;
  endfunction

  // BPSK symbol of amplitude amp plus noise, quantised to a signed
  // w-bit code with frac fractional bits.
  function automatic int quantise(int bit_v, real amp, real sigma, int w, int frac);
    real v;
    int  q, lim;
    v   = (bit_v ? amp : -amp) + noise(sigma);
    q   = int'($floor(v * real'(1 << frac) + 0.5));
    lim = 1 << (w - 1);
    if (q > lim - 1) q = lim - 1;
    if (q < -lim)    q = -lim;
    return q;
  endfunction

endpackage
