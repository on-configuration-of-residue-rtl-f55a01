// mqrns_pkg: number system shared by every block of the MQRNS FFT processor.
//
// A real number is carried as its residues modulo NMOD pairwise coprime
// moduli (one processing channel per modulus); a complex number is carried in
// CRNS form, i.e. a real and an imaginary residue vector. The processor has
// seven channels, m1..m7, as in the processor block diagram; the modulus
// values, the 6-bit residue width and the MQRNS constant are this design's
// choice. MQRNS: in channel m_i the number J_i satisfies J_i^2 = -MQ_N (mod m_i),
// so a complex product needs three real multiplications per channel. MQ_N = 77 is
// the smallest constant for which -MQ_N is a quadratic residue of all seven
// moduli (59, 47 and 43 are 3 mod 4, so plain QRNS with J^2 = -1 is impossible).
//
// The scaling constant K is the product of the first NSCALE moduli
// (K = 61*59 = 3599). Twiddle factors are round(K*W) and every butterfly output
// is divided by K by a residue scaler. Signed numbers X lie in [-(M-1)/2,(M-1)/2],
// M the product of all moduli (about 2^39).
//
// Helper functions: modular add/sub/multiply for small moduli (synthesizable,
// used by the datapath) and elaboration-time constants (inverses, J_i, residues
// of wide constants).
package mqrns_pkg;

  localparam int NMOD   = 7;   // number of residue channels (m1..m7)
  localparam int RW     = 6;   // residue width in bits
  localparam int NSCALE = 2;   // K = product of the first NSCALE moduli
  localparam int MQ_N   = 77;  // MQRNS constant: J_i^2 = -MQ_N mod m_i

  typedef int unsigned modlist_t [NMOD];
  localparam modlist_t MODULI = '{61, 59, 53, 47, 43, 41, 37};

  typedef logic [RW-1:0]         res_t;   // one residue
  typedef res_t [NMOD-1:0]       rvec_t;  // one real number, all channels
  typedef struct packed {
    rvec_t re;
    rvec_t im;
  } cvec_t;                               // one complex number (CRNS form)

  // ---------------------------------------------------------------- datapath
  function automatic res_t add_mod(res_t a, res_t b, int unsigned m);
    logic [RW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (RW+1)'(m)) s = s - (RW+1)'(m);
    return s[RW-1:0];
  endfunction

  function automatic res_t sub_mod(res_t a, res_t b, int unsigned m);
    logic [RW:0] s;
    s = {1'b0, a} + (RW+1)'(m) - {1'b0, b};
    if (s >= (RW+1)'(m)) s = s - (RW+1)'(m);
    return s[RW-1:0];
  endfunction

  function automatic res_t mul_mod(res_t a, res_t b, int unsigned m);
    logic [2*RW-1:0] p;
    p = {{RW{1'b0}}, a} * {{RW{1'b0}}, b};
    return res_t'(p % (2*RW)'(m));
  endfunction

  // -------------------------------------------------------- elaboration time
  function automatic int unsigned inv_mod(int unsigned a, int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned k = 1; k < m; k++)
      if (((a % m) * k) % m == 1) r = k;
    return r;
  endfunction

  // J with J*J = -MQ_N (mod m); the smaller of the two roots
  function automatic int unsigned mq_j(int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned k = m - 1; k >= 1; k--)
      if ((k * k + MQ_N) % m == 0) r = k;
    return r;
  endfunction

  function automatic longint unsigned dyn_range();
    longint unsigned p;
    p = 1;
    for (int i = 0; i < NMOD; i++) p = p * MODULI[i];
    return p;
  endfunction

  function automatic longint unsigned scale_k();
    longint unsigned p;
    p = 1;
    for (int i = 0; i < NSCALE; i++) p = p * MODULI[i];
    return p;
  endfunction

  // residue of a signed 64-bit constant
  function automatic int unsigned lres(longint x, int unsigned m);
    longint r;
    r = x % longint'(m);
    if (r < 0) r = r + longint'(m);
    return 32'(r);
  endfunction

  localparam longint unsigned DYN_M    = dyn_range();            // M
  localparam longint unsigned K_SCALE  = scale_k();              // K
  localparam longint unsigned HALF_M   = (DYN_M - 1) / 2;        // signed offset H
  localparam longint unsigned OFFS_Q   = HALF_M / K_SCALE;       // H div K
  localparam longint unsigned OFFS_R   = HALF_M % K_SCALE;       // H mod K

endpackage
