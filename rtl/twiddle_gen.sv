// twiddle_gen: integer twiddle factors of one FFT stage, in residue form.
//
// The FFT coefficients are fractional, so the processor multiplies them by the
// constant K and rounds them to integers; the scalers later divide by K. For
// butterfly group i of a stage whose butterflies span 4L points, output k needs
// W^(k*i*N/(4L)) with W = exp(-2*pi*j/N). This block returns, for k = 0..3,
//   re = round(K*cos(2*pi*e/N)),  im = -round(K*sin(2*pi*e/N))
// reduced modulo every channel modulus.
//
// A quarter-wave table of round(K*cos(2*pi*t/1024)), t = 0..256, is read from
// twiddle_cos.hex; sine values and the other quadrants come from the table by
// symmetry (sin(p) = cos(pi/2 - p)). Each signed value is then reduced modulo
// the moduli. The table and the symmetry trick are this design's choice.
//
// Interface: grp is the group index i; the twiddles appear one clock later
// (registered). N must be a power of four not above 1024.
module twiddle_gen
  import mqrns_pkg::*;
#(
  parameter int N = 1024,   // transform length
  parameter int L = 256     // quarter span of this stage's butterflies
)(
  input  logic                         clk,
  input  logic [$clog2(L > 1 ? L : 2)-1:0] grp,
  output rvec_t                        w_re [4],
  output rvec_t                        w_im [4]
);
  localparam int TAB_N  = 1024;              // resolution of the stored table
  localparam int QTR    = TAB_N / 4;
  localparam int TSTEP  = TAB_N / N;         // table steps per exponent step
  localparam int ESTEP  = N / (4 * L);       // exponent step per group index
  localparam int TW     = 12;                // width of the stored magnitudes

  logic [TW-1:0] cos_tab [QTR + 1];
  initial $readmemh("rtl/twiddle_cos.hex", cos_tab);

  typedef logic signed [TW:0] tw_int_t;

  // residue of a signed twiddle value
  function automatic res_t to_res(tw_int_t v, int unsigned m);
    logic [TW-1:0] mag;
    logic [TW-1:0] r;
    mag = v[TW] ? TW'(-v) : TW'(v);
    r   = mag % TW'(m);
    if (v[TW] && r != 0) r = TW'(m) - r;
    return res_t'(r);
  endfunction

  tw_int_t c_int [4], s_int [4];   // K*cos, K*sin of each exponent

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic [9:0] e;      // exponent in table units, modulo 1024
      logic [1:0] q;
      logic [7:0] r;
      tw_int_t    cphi, sphi;
      e    = 10'(k * int'(grp) * ESTEP * TSTEP);
      q    = e[9:8];
      r    = e[7:0];
      cphi = tw_int_t'({1'b0, cos_tab[{1'b0, r}]});
      sphi = tw_int_t'({1'b0, cos_tab[9'(QTR) - {1'b0, r}]});
      case (q)
        2'd0:    begin c_int[k] =  cphi; s_int[k] =  sphi; end
        2'd1:    begin c_int[k] = -sphi; s_int[k] =  cphi; end
        2'd2:    begin c_int[k] = -cphi; s_int[k] = -sphi; end
        default: begin c_int[k] =  sphi; s_int[k] = -cphi; end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < NMOD; i++) begin
        w_re[k][i] <= to_res(c_int[k], MODULI[i]);
        w_im[k][i] <= to_res(-s_int[k], MODULI[i]);
      end
  end

endmodule
