// fft_stage: one radix-4 stage of the pipelined MQRNS FFT processor.
//
// Data path, in the order of the processor's stage:
//   c4_reorder    gathers four inputs x[b*4L + i + p*L], p = 0..3
//   twiddle_gen   K-scaled twiddles W^(k*i*N/(4L)) in residue form
//   bf4_mqrns     NMOD butterflies, one per modulus, working in parallel
//   p2s_conv      serialises the eight real results onto two scalers
//   rns_scaler x2 SCALER1 (real parts) and SCALER2 (imaginary parts) divide
//                 by K, giving one complex number per clock
// Stage STAGE of a length-N transform has butterflies spanning 4L points,
// L = N / 4^(STAGE+1). The stream leaving the stage holds, for each group
// g = b*L + i, the four results y0..y3 in turn, i.e. in-place positions
// b*4L + p*L + i, which is how the next stage's commutator writes them.
//
// Interface: in_valid/in_data and out_valid/out_data carry one complex
// residue number per clock. Status pulses bank_swap (a frame entered the
// butterflies), bf_fire (a butterfly set started) and mux_sel (converter
// multiplexer setting, valid with out of the converter) are brought out for
// observation. Latency from the commutator output to the stage output:
// 1 (twiddle) + 3 (butterfly) + P2S_DELAY + 8 (scaler) clocks.
module fft_stage
  import mqrns_pkg::*;
#(
  parameter int N         = 1024,  // transform length
  parameter int STAGE     = 0,     // stage number, 0 = first
  parameter int P2S_DELAY = 4      // converter delay to the first scaler input
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cvec_t      in_data,
  output logic       out_valid,
  output cvec_t      out_data,
  output logic       bank_swap,
  output logic       bf_fire,
  output logic       p2s_valid,
  output logic [1:0] mux_sel
);
  localparam int L    = N >> (2 * (STAGE + 1));
  localparam int WR_L = (STAGE == 0) ? 0 : 4 * L;
  localparam int GW   = $clog2(L > 1 ? L : 2);

  // ------------------------------------------------------------ commutator
  logic          grp_valid;
  cvec_t         grp_x [4];
  logic [GW-1:0] grp_i;

  c4_reorder #(.N(N), .WR_L(WR_L), .RD_L(L)) u_c4 (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(grp_valid), .out_x(grp_x), .out_grp(grp_i), .bank_swap
  );
  assign bf_fire = grp_valid;

  // -------------------------------------------------------------- twiddles
  rvec_t w_re [4], w_im [4];
  twiddle_gen #(.N(N), .L(L)) u_tw (.clk, .grp(grp_i), .w_re, .w_im);

  // align the data with the registered twiddles
  cvec_t x_q [4];
  logic  x_v;
  always_ff @(posedge clk) x_q <= grp_x;
  always_ff @(posedge clk) begin
    if (!rst_n) x_v <= 1'b0;
    else        x_v <= grp_valid;
  end

  // ------------------------------------------ one butterfly per modulus
  rvec_t y_re [4], y_im [4];
  logic  [NMOD-1:0] bf_v;

  for (genvar m = 0; m < NMOD; m++) begin : g_bf
    res_t xr [4], xi [4], wr [4], wi [4], yr [4], yi [4];
    always_comb begin
      for (int l = 0; l < 4; l++) begin
        xr[l] = x_q[l].re[m];
        xi[l] = x_q[l].im[m];
        wr[l] = w_re[l][m];
        wi[l] = w_im[l][m];
      end
    end
    bf4_mqrns #(.MOD(MODULI[m])) u_bf (
      .clk, .rst_n, .in_valid(x_v),
      .x_re(xr), .x_im(xi), .w_re(wr), .w_im(wi),
      .out_valid(bf_v[m]), .y_re(yr), .y_im(yi)
    );
    always_comb begin
      for (int l = 0; l < 4; l++) begin
        y_re[l][m] = yr[l];
        y_im[l][m] = yi[l];
      end
    end
  end

  // ---------------------------------------- parallel-to-serial converter
  rvec_t s_re, s_im;
  p2s_conv #(.DELAY(P2S_DELAY)) u_p2s (
    .clk, .rst_n, .in_valid(bf_v[0]), .in_re(y_re), .in_im(y_im),
    .out_valid(p2s_valid), .out_sel(mux_sel), .out_re(s_re), .out_im(s_im)
  );

  // ------------------------------------------------------- two scalers
  logic sc_v_re, sc_v_im;
  rns_scaler u_scaler1 (.clk, .rst_n, .in_valid(p2s_valid), .in_x(s_re),
                        .out_valid(sc_v_re), .out_y(out_data.re));
  rns_scaler u_scaler2 (.clk, .rst_n, .in_valid(p2s_valid), .in_x(s_im),
                        .out_valid(sc_v_im), .out_y(out_data.im));
  assign out_valid = sc_v_re;

  // the butterflies of all channels run in lock step, and so do both scalers
  a_bf_lockstep: assert property (@(posedge clk) disable iff (!rst_n) bf_v == {NMOD{bf_v[0]}})
    else $error("fft_stage: butterflies out of step");

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) sc_v_re == sc_v_im)
    else $error("fft_stage: scalers out of step");

endmodule
