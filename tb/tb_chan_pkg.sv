// Test signal source for the receiver testbenches: a QPSK transmitter and a
// baseband channel, evaluated at the receiver's sampling instants.
//
// Symbols a_k = (+/-1) + j(+/-1) are random; bit 0 of a symbol is set when its
// I part is negative, bit 1 when Q is negative (the receiver's decision
// mapping). The transmitted signal is s(t) = sum_k a_k p(t - k) with a raised
// cosine pulse p (roll-off beta, truncated to +/-6 symbols), t in symbol
// periods. The channel adds two echoes, r(t) = s(t) + h1 s(t - 1/2)
// + h2 s(t - 1), rotates by a carrier frequency offset, scales, applies a
// gain error and an I-to-Q leakage on Q, adds uniform noise and quantizes to
// 10 bits (optionally also Gaussian noise). Sample n is taken at t_n = n/2 * (1 + sfo): sfo > 0 means the
// transmitter clock is faster than the receiver's, and sfo can be changed
// during a run.
package tb_chan_pkg;

  class qpsk_chan;
    real   beta    = 0.5;
    real   h1      = 0.25;
    real   h2      = -0.1;
    real   gain    = 110.0;
    real   cfo     = 0.0;    // carrier offset in cycles per symbol
    real   phase0  = 0.1;    // rad
    real   sfo     = 0.0;
    real   q_gain  = 1.0;    // Q branch gain error
    real   q_leak  = 0.0;    // fraction of I leaking into Q
    real   noise   = 2.0;    // peak uniform noise, LSB
    real   sigma   = 0.0;    // standard deviation of added Gaussian noise, LSB
    real   t       = 0.0;
    bit [1:0] syms [$];

    function automatic bit [1:0] sym_at(int k);
      while (syms.size() <= k)
        syms.push_back(2'($urandom));
      return syms[k];
    endfunction

    function automatic real pulse(real x);
      real pi, den, sn;
      pi = 3.14159265358979;
      if (x < 0.0) x = -x;
      if (x > 6.0) return 0.0;
      sn  = (x < 1e-9) ? 1.0 : $sin(pi * x) / (pi * x);
      den = 1.0 - (2.0 * beta * x) * (2.0 * beta * x);
      if (den < 1e-6 && den > -1e-6) begin
        real u;
        u = 1.0 / (2.0 * beta);
        return (pi / 4.0) * $sin(pi * u) / (pi * u);
      end
      return sn * $cos(pi * beta * x) / den;
    endfunction

    // transmitted baseband at time tt
    function automatic void tx_at(real tt, output real re, output real im);
      int k0;
      re = 0.0;
      im = 0.0;
      k0 = $rtoi($floor(tt));
      for (int k = k0 - 6; k <= k0 + 7; k++) begin
        bit [1:0] s;
        real p;
        if (k < 0) continue;
        s = sym_at(k);
        p = pulse(tt - real'(k));
        re += (s[0] ? -1.0 : 1.0) * p;
        im += (s[1] ? -1.0 : 1.0) * p;
      end
    endfunction

    function automatic int q10(real v);
      int r;
      r = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
      if (r > 511) r = 511;
      if (r < -512) r = -512;
      return r;
    endfunction

    // unit Gaussian by the Box-Muller method
    function automatic real gauss();
      real u1, u2;
      u1 = ($itor($urandom_range(1000000)) + 1.0) / 1000001.0;
      u2 = $itor($urandom_range(1000000)) / 1000000.0;
      return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
    endfunction

    // next receiver sample
    function automatic void next(output int si, output int sq);
      real r0, i0, r1, i1, r2, i2, re, im, ph, c, s, yi, yq;
      tx_at(t, r0, i0);
      tx_at(t - 0.5, r1, i1);
      tx_at(t - 1.0, r2, i2);
      re = r0 + h1 * r1 + h2 * r2;
      im = i0 + h1 * i1 + h2 * i2;
      ph = 2.0 * 3.14159265358979 * cfo * t + phase0;
      c  = $cos(ph);
      s  = $sin(ph);
      yi = gain * (re * c - im * s);
      yq = gain * (re * s + im * c);
      yq = q_gain * (yq + q_leak * yi);
      yi += noise * ($itor($urandom_range(2000)) / 1000.0 - 1.0);
      yq += noise * ($itor($urandom_range(2000)) / 1000.0 - 1.0);
      if (sigma > 0.0) begin
        yi += sigma * gauss();
        yq += sigma * gauss();
      end
      si = q10(yi);
      sq = q10(yq);
      t += 0.5 * (1.0 + sfo);
    endfunction
  endclass

  // Compares received decisions with the transmitted symbols. lock() looks for
  // the lag and the quarter-turn rotation (a blind QPSK receiver may settle on
  // any of the four) at which the last LEN decisions equal the transmitted
  // sequence;
  // once locked, every further decision is compared at that fixed lag, so a
  // lost or repeated symbol shows up as errors.
  class sym_checker;
    qpsk_chan ch;
    bit [1:0] rx [$];
    bit       locked   = 1'b0;
    int       lag      = 0;
    int       rot      = 0;
    int       errors   = 0;
    int       compared = 0;

    function new(qpsk_chan c);
      ch = c;
    endfunction

    // transmitted symbol k turned by r quarter turns: (I, Q) * j = (-Q, I)
    function automatic bit [1:0] tx(int k, int r);
      bit [1:0] v;
      v = ch.sym_at(k);
      for (int i = 0; i < r; i++)
        v = {v[0], ~v[1]};
      return v;
    endfunction

    function automatic void push(bit [1:0] s);
      int m;
      m = rx.size();
      rx.push_back(s);
      if (locked) begin
        compared++;
        if (m + lag < 0 || tx(m + lag, rot) != s) errors++;
      end
    endfunction

    function automatic bit lock(int len);
      int n;
      n = rx.size();
      if (locked) return 1'b1;
      if (n < len) return 1'b0;
      for (int r = 0; r < 4; r++)
        for (int l = -200; l <= 200; l++) begin
          bit ok;
          ok = 1'b1;
          for (int m = n - len; m < n; m++)
            if (m + l < 0 || tx(m + l, r) != rx[m]) begin
              ok = 1'b0;
              break;
            end
          if (ok) begin
            locked = 1'b1;
            lag = l;
            rot = r;
            return 1'b1;
          end
        end
      return 1'b0;
    endfunction
  endclass

endpackage
