// tb_turbo_pkg: reference models shared by the testbenches: the LTE QPP
// interleaver by its closed formula, the 8-state RSC encoder written as a
// shift register, a Gaussian noise source and the 6-bit LLR quantiser.
// These are written independently of the RTL so that the testbenches can
// check the decoder against the transmitted bits.
package tb_turbo_pkg;

  // pi(i) = (f1*i + f2*i^2) mod K, evaluated directly.
  function automatic int qpp(int i, int k, int f1, int f2);
    longint li;
    li = longint'(i);
    return int'((longint'(f1) * li + longint'(f2) * li * li) % longint'(k));
  endfunction

  // One step of the RSC encoder, g0 = 1+D^2+D^3 (feedback), g1 = 1+D+D^3.
  // reg3 = {d1, d2, d3}, d1 the most recent register.
  function automatic bit rsc_step(ref bit [2:0] reg3, input bit u);
    bit a, p;
    a    = u ^ reg3[1] ^ reg3[0];       // feedback taps D^2 and D^3
    p    = a ^ reg3[2] ^ reg3[0];       // parity taps 1, D and D^3
    reg3 = {a, reg3[2], reg3[1]};
    return p;
  endfunction

  // Approximately normal sample with unit variance (Irwin-Hall, 12 terms).
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int j = 0; j < 12; j++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // BPSK symbol (bit 0 -> +1) through AWGN of variance sigma2, returned as a
  // 6-bit LLR with 1 LSB = 0.5 (L = 2y/sigma2, rounded, clipped to +-31).
  function automatic int channel_llr(bit b, real sigma2);
    real y, l;
    int  q;
    y = (b ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
    l = 2.0 * y / sigma2 * 2.0;
    q = (l >= 0.0) ? int'(l + 0.5) : -int'(-l + 0.5);
    if (q > 31)  q = 31;
    if (q < -31) q = -31;
    return q;
  endfunction

  // Noise variance for Eb/N0 in dB at code rate r (BPSK/QPSK per dimension).
  function automatic real sigma2_of(real ebn0_db, real r);
    return 1.0 / (2.0 * r * (10.0 ** (ebn0_db / 10.0)));
  endfunction

endpackage
