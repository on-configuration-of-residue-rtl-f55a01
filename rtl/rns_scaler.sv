// rns_scaler: pipelined scaling of a signed residue number by K.
//
// Input X is a signed number in residue form (all NMOD channels); the output
// is Y = floor((X + r) / K) in residue form, where K = m1*m2 (the first NSCALE
// moduli), H = (M-1)/2 and r = H mod K, i.e. X/K rounded to within one unit.
// The scaler is the one the processor needs after each butterfly stage;
// scaling by mixed-radix conversion follows the approach the processor cites,
// while the pipeline below is this design's own:
//   stage 0          X' = X + H, which maps the signed range onto [0, M)
//   stages 1..NSCALE mixed-radix digits a_s of X' are removed one modulus at a
//                    time: v_i <- (v_i - a_s) * m_s^-1 (mod m_i). Afterwards
//                    channels NSCALE.. hold Y' = floor(X'/K).
//   next stages      base extension: the mixed-radix digits b_s of Y' in the
//                    remaining channels are formed the same way and summed,
//                    weighted, into channels 0..NSCALE-1
//   last stage       the offset is removed again: Y = Y' - (H div K).
// Interface: one number per clock, in_valid/out_valid, latency NMOD+1
// cycles (8), no stalls. Synchronous active-low reset clears the valid pipe.
module rns_scaler
  import mqrns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rvec_t in_x,
  output logic  out_valid,
  output rvec_t out_y
);

  // v: working residues, u: Y' captured after the last scaling step,
  // acc: Y' being rebuilt in channels 0..NSCALE-1
  rvec_t v   [NMOD];
  rvec_t u   [NMOD];
  rvec_t acc [NMOD];
  logic  vld [NMOD];

  // weight of mixed-radix digit s of Y' in channel c: prod m_l, NSCALE<=l<s
  function automatic res_t mr_weight(int s, int c);
    int unsigned w;
    w = 1;
    for (int l = NSCALE; l < s; l++) w = (w * MODULI[l]) % MODULI[c];
    return res_t'(w);
  endfunction

  // stage 0: add the signed offset
  always_ff @(posedge clk) begin
    for (int i = 0; i < NMOD; i++) begin
      v[0][i]   <= add_mod(in_x[i], res_t'(lres(longint'(HALF_M), MODULI[i])), MODULI[i]);
      u[0][i]   <= '0;
      acc[0][i] <= '0;
    end
  end

  // stages 1..NMOD-1: one mixed-radix digit per stage
  for (genvar st = 1; st < NMOD; st++) begin : g_mrc
    localparam int S = st - 1;   // channel whose digit is removed
    always_ff @(posedge clk) begin
      for (int i = 0; i < NMOD; i++) begin
        if (i > S)
          v[st][i] <= mul_mod(sub_mod(v[st-1][i], res_t'(32'(v[st-1][S]) % MODULI[i]), MODULI[i]),
                              res_t'(inv_mod(MODULI[S], MODULI[i])), MODULI[i]);
        else
          v[st][i] <= v[st-1][i];
      end
      // Y' residues are ready once the NSCALE scaling digits are removed
      if (st == NSCALE) begin
        for (int i = 0; i < NMOD; i++)
          u[st][i] <= (i > S)
                      ? mul_mod(sub_mod(v[st-1][i], res_t'(32'(v[st-1][S]) % MODULI[i]), MODULI[i]),
                                res_t'(inv_mod(MODULI[S], MODULI[i])), MODULI[i])
                      : '0;
      end else begin
        u[st] <= u[st-1];
      end
      // base extension: accumulate digit b_S of Y' into the low channels
      for (int c = 0; c < NMOD; c++) begin
        if (S >= NSCALE && c < NSCALE)
          acc[st][c] <= add_mod(acc[st-1][c],
                                mul_mod(res_t'(32'(v[st-1][S]) % MODULI[c]), mr_weight(S, c), MODULI[c]),
                                MODULI[c]);
        else
          acc[st][c] <= acc[st-1][c];
      end
    end
  end

  // last stage: final digit, then remove the offset H div K
  always_ff @(posedge clk) begin
    for (int i = 0; i < NMOD; i++) begin
      if (i < NSCALE)
        out_y[i] <= sub_mod(
                      add_mod(acc[NMOD-1][i],
                              mul_mod(res_t'(32'(v[NMOD-1][NMOD-1]) % MODULI[i]),
                                      mr_weight(NMOD-1, i), MODULI[i]),
                              MODULI[i]),
                      res_t'(lres(longint'(OFFS_Q), MODULI[i])), MODULI[i]);
      else
        out_y[i] <= sub_mod(u[NMOD-1][i], res_t'(lres(longint'(OFFS_Q), MODULI[i])), MODULI[i]);
    end
  end

  // valid pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NMOD; k++) vld[k] <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int k = 1; k < NMOD; k++) vld[k] <= vld[k-1];
      out_valid <= vld[NMOD-1];
    end
  end

endmodule
