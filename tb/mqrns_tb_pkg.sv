// mqrns_tb_pkg: reference arithmetic for the MQRNS FFT testbenches.
//
// Everything here works on plain 64-bit integers, independently of the
// residue hardware: conversion to and from residues (Chinese remainder
// theorem), the K-scaled twiddles computed with $cos/$sin, the scaler's
// rounding rule, and one radix-4 DIF stage on an integer array exactly as the
// processor computes it (exact sums and products, then floor((v + r)/K)).
package mqrns_tb_pkg;
  import mqrns_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic int unsigned umod(longint x, int unsigned m);
    longint r;
    r = x % longint'(m);
    if (r < 0) r += longint'(m);
    return 32'(r);
  endfunction

  function automatic rvec_t to_rvec(longint x);
    rvec_t v;
    for (int i = 0; i < NMOD; i++) v[i] = res_t'(umod(x, MODULI[i]));
    return v;
  endfunction

  function automatic cvec_t to_cvec(longint re, longint im);
    cvec_t c;
    c.re = to_rvec(re);
    c.im = to_rvec(im);
    return c;
  endfunction

  function automatic longint unsigned mod_inv_l(longint unsigned a, longint unsigned m);
    longint unsigned r;
    r = 0;
    for (longint unsigned k = 1; k < m; k++)
      if ((a % m) * k % m == 1) r = k;
    return r;
  endfunction

  // signed value of a residue vector (CRT), in [-(M-1)/2, (M-1)/2]
  function automatic longint from_rvec(rvec_t v);
    longint unsigned mm, mi, s;
    s  = 0;
    mm = DYN_M;
    for (int i = 0; i < NMOD; i++) begin
      mi = mm / MODULI[i];
      s  = (s + ((longint'(v[i]) * mod_inv_l(mi % MODULI[i], MODULI[i])) % MODULI[i]) * mi) % mm;
    end
    if (s > HALF_M) return longint'(s) - longint'(mm);
    return longint'(s);
  endfunction

  // scaler rule: floor((x + r)/K), r = H mod K
  function automatic longint scale_ref(longint x);
    return (x + longint'(HALF_M)) / longint'(K_SCALE) - longint'(OFFS_Q);
  endfunction

  // K-scaled twiddle W^e, W = exp(-2*pi*j/n)
  function automatic longint tw_re(int e, int n);
    return longint'($floor(real'(K_SCALE) * $cos(2.0 * PI * e / n) + 0.5));
  endfunction
  function automatic longint tw_im(int e, int n);
    return -longint'($floor(real'(K_SCALE) * $sin(2.0 * PI * e / n) + 0.5));
  endfunction

  // one radix-4 DIF stage, in place, on an integer array of length n
  task automatic ref_stage(inout longint xr[], inout longint xi[], input int n, input int stage);
    int l;
    l = n >> (2 * (stage + 1));
    for (int b = 0; b < n / (4 * l); b++)
      for (int i = 0; i < l; i++) begin
        longint ar[4], ai[4], sr[4], si[4];
        int base;
        base = b * 4 * l + i;
        for (int p = 0; p < 4; p++) begin
          ar[p] = xr[base + p * l];
          ai[p] = xi[base + p * l];
        end
        sr[0] = ar[0] + ar[1] + ar[2] + ar[3];  si[0] = ai[0] + ai[1] + ai[2] + ai[3];
        sr[1] = ar[0] + ai[1] - ar[2] - ai[3];  si[1] = ai[0] - ar[1] - ai[2] + ar[3];
        sr[2] = ar[0] - ar[1] + ar[2] - ar[3];  si[2] = ai[0] - ai[1] + ai[2] - ai[3];
        sr[3] = ar[0] - ai[1] - ar[2] + ai[3];  si[3] = ai[0] + ar[1] - ai[2] - ar[3];
        for (int p = 0; p < 4; p++) begin
          longint wr, wi;
          int e;
          e  = p * i * (n / (4 * l));
          wr = tw_re(e, n);
          wi = tw_im(e, n);
          xr[base + p * l] = scale_ref(sr[p] * wr - si[p] * wi);
          xi[base + p * l] = scale_ref(sr[p] * wi + si[p] * wr);
        end
      end
  endtask

  // in-place position of the c-th number of a stream grouped with quarter span l
  function automatic int in_place(int c, int l);
    int g, p;
    g = c / 4;
    p = c % 4;
    return (g / l) * 4 * l + p * l + (g % l);
  endfunction

endpackage
