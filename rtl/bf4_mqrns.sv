// bf4_mqrns: radix-4 decimation-in-frequency butterfly for one residue channel.
//
// The processor has one such butterfly per modulus in every stage. It takes
// four complex residues x0..x3 (CRNS form, modulo MOD) and four twiddle
// residues w0..w3, and returns y_k = w_k * sum_l x_l * (-i)^(k*l), i.e. the
// radix-4 sums followed by the twiddle multiplication. w0 is the scaled unit
// twiddle K, so all four outputs carry the same factor K that the scalers
// remove afterwards.
//
// The complex product uses MQRNS: with J^2 = -MQ_N (mod MOD), a + ib maps to
// A = a + Jb and A* = a - Jb; for data (a,b) and twiddle (c,d)
//   E  = A*C   + (MQ_N-1)*b*d = re + J*im
//   E* = A'*C' + (MQ_N-1)*b*d = re - J*im
// so three real multiplications per product (A*C, A'*C', b*d') give the result,
// and re = (E+E*)/2, im = (E-E*)/(2J) map it back to CRNS form. The radix-4
// sums follow the standard DIF butterfly; the MQRNS forms and the pipelining
// are this design's reading of the processor's butterfly.
//
// Timing: fully pipelined, one butterfly per clock, latency 3 cycles
// (sums | MQRNS products | back to CRNS). in_valid travels with the data.
module bf4_mqrns
  import mqrns_pkg::*;
#(
  parameter int unsigned MOD = 61   // modulus of this channel
)(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  res_t x_re [4],
  input  res_t x_im [4],
  input  res_t w_re [4],
  input  res_t w_im [4],
  output logic out_valid,
  output res_t y_re [4],
  output res_t y_im [4]
);
  localparam int unsigned J      = mq_j(MOD);
  localparam int unsigned NM1    = (MQ_N - 1) % MOD;
  localparam int unsigned INV2   = inv_mod(2, MOD);
  localparam int unsigned INV2J  = inv_mod((2 * J) % MOD, MOD);

  localparam res_t RJ     = res_t'(J);
  localparam res_t RNM1   = res_t'(NM1);
  localparam res_t RINV2  = res_t'(INV2);
  localparam res_t RINV2J = res_t'(INV2J);

  // ---------------------------------------------------------- stage 1: sums
  res_t s_re [4], s_im [4];
  res_t s1_re [4], s1_im [4], w1_re [4], w1_im [4];
  logic v1;

  always_comb begin
    // y0 = x0 + x1 + x2 + x3
    s_re[0] = add_mod(add_mod(x_re[0], x_re[1], MOD), add_mod(x_re[2], x_re[3], MOD), MOD);
    s_im[0] = add_mod(add_mod(x_im[0], x_im[1], MOD), add_mod(x_im[2], x_im[3], MOD), MOD);
    // y1 = x0 - i x1 - x2 + i x3
    s_re[1] = sub_mod(add_mod(x_re[0], x_im[1], MOD), add_mod(x_re[2], x_im[3], MOD), MOD);
    s_im[1] = sub_mod(add_mod(x_im[0], x_re[3], MOD), add_mod(x_re[1], x_im[2], MOD), MOD);
    // y2 = x0 - x1 + x2 - x3
    s_re[2] = sub_mod(add_mod(x_re[0], x_re[2], MOD), add_mod(x_re[1], x_re[3], MOD), MOD);
    s_im[2] = sub_mod(add_mod(x_im[0], x_im[2], MOD), add_mod(x_im[1], x_im[3], MOD), MOD);
    // y3 = x0 + i x1 - x2 - i x3
    s_re[3] = sub_mod(add_mod(x_re[0], x_im[3], MOD), add_mod(x_im[1], x_re[2], MOD), MOD);
    s_im[3] = sub_mod(add_mod(x_im[0], x_re[1], MOD), add_mod(x_im[2], x_re[3], MOD), MOD);
  end

  always_ff @(posedge clk) begin
    s1_re <= s_re;
    s1_im <= s_im;
    w1_re <= w_re;
    w1_im <= w_im;
  end

  // ------------------------------------------ stage 2: MQRNS multiplication
  res_t p_ac [4], p_cc [4], p_bd [4];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      // A = a + Jb, A* = a - Jb ; C = c + Jd, C* = c - Jd ; D' = (MQ_N-1) d
      p_ac[k] <= mul_mod(add_mod(s1_re[k], mul_mod(RJ, s1_im[k], MOD), MOD),
                         add_mod(w1_re[k], mul_mod(RJ, w1_im[k], MOD), MOD), MOD);
      p_cc[k] <= mul_mod(sub_mod(s1_re[k], mul_mod(RJ, s1_im[k], MOD), MOD),
                         sub_mod(w1_re[k], mul_mod(RJ, w1_im[k], MOD), MOD), MOD);
      p_bd[k] <= mul_mod(s1_im[k], mul_mod(RNM1, w1_im[k], MOD), MOD);
    end
  end

  // --------------------------------------------- stage 3: back to CRNS form
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      y_re[k] <= mul_mod(add_mod(add_mod(p_ac[k], p_bd[k], MOD),
                                 add_mod(p_cc[k], p_bd[k], MOD), MOD), RINV2, MOD);
      y_im[k] <= mul_mod(sub_mod(p_ac[k], p_cc[k], MOD), RINV2J, MOD);
    end
  end

  // ------------------------------------------------------------ valid pipe
  logic v2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end

endmodule
