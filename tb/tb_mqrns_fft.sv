// tb_mqrns_fft: end-to-end test of the MQRNS FFT processor at its default
// size (1024 points, five stages).
//
// Three frames are streamed in: random samples with random input gaps, random
// samples back to back, and a full-scale frame (+-8191 everywhere). Every
// output is checked two ways:
//   * bit-exact against an integer model of the five stages (exact sums and
//     products with the K-scaled twiddles, floor((v + r)/K) after each stage);
//   * against a floating-point DFT of the frame, within a tolerance that
//     covers twiddle quantisation and the per-stage rounding.
// out_bin must be the digit-reversed output position. Also counted: frames
// swapped into each stage, butterfly sets, each converter multiplexer
// setting in each stage, and negative results leaving the scalers; a
// mechanism that never occurs counts as a failure.
module tb_mqrns_fft;
  import mqrns_pkg::*;
  import mqrns_tb_pkg::*;

  localparam int N      = 1024;
  localparam int STAGES = 5;
  localparam int FRAMES = 3;
  localparam int AMP    = 8191;

  logic                    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cvec_t                   in_data = '0;
  logic                    out_valid;
  cvec_t                   out_data;
  logic [9:0]              out_bin;
  logic [STAGES-1:0]       bank_swap, bf_fire, p2s_valid;
  logic [STAGES-1:0][1:0]  mux_sel;

  mqrns_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nout = 0, nneg = 0, ngaps = 0;
  int swaps[STAGES], fires[STAGES], sel_seen[STAGES][4];
  longint xr[FRAMES][N], xi[FRAMES][N];   // input frames
  longint er[FRAMES][N], ei[FRAMES][N];   // integer model, output order
  real    cosv[N], sinv[N];
  real    max_err = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digrev(int c);
    int r;
    r = 0;
    for (int d = 0; d < STAGES; d++) r = (r << 2) | ((c >> (2 * d)) & 3);
    return r;
  endfunction

  // floating-point DFT bin k of frame f, compared with the decoded output
  task automatic check_dft(int f, int k, longint gr, longint gi);
    real sr, si, err, tol;
    sr = 0.0; si = 0.0;
    for (int n = 0; n < N; n++) begin
      int e;
      e  = (n * k) % N;
      sr += real'(xr[f][n]) * cosv[e] + real'(xi[f][n]) * sinv[e];
      si += real'(xi[f][n]) * cosv[e] - real'(xr[f][n]) * sinv[e];
    end
    err = $sqrt((real'(gr) - sr) ** 2 + (real'(gi) - si) ** 2);
    tol = 500.0 + 2.0e-3 * $sqrt(sr * sr + si * si);
    if (err > max_err) max_err = err;
    checks++;
    if (err > tol) begin
      failures++;
      if (failures < 10) $display("frame %0d bin %0d: DFT error %f (tol %f)", f, k, err, tol);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < STAGES; s++) begin
        if (bank_swap[s]) swaps[s]++;
        if (bf_fire[s]) fires[s]++;
        if (p2s_valid[s]) sel_seen[s][mux_sel[s]]++;
      end
      if (out_valid) begin
        int f, c;
        longint gr, gi;
        f  = nout / N;
        c  = nout % N;
        gr = from_rvec(out_data.re);
        gi = from_rvec(out_data.im);
        if (gr < 0 || gi < 0) nneg++;
        checks++;
        if (f >= FRAMES || out_data !== to_cvec(er[f][c], ei[f][c])) begin
          failures++;
          if (failures < 10)
            $display("frame %0d out %0d: got (%0d,%0d) expected (%0d,%0d)", f, c, gr, gi,
                     er[f][c], ei[f][c]);
        end
        checks++;
        if (int'(out_bin) != digrev(c)) failures++;
        if (f < FRAMES) check_dft(f, digrev(c), gr, gi);
        nout++;
      end
    end
  end

  initial begin
    for (int e = 0; e < N; e++) begin
      cosv[e] = $cos(2.0 * PI * e / N);
      sinv[e] = $sin(2.0 * PI * e / N);
    end
    // stimulus and integer model
    for (int f = 0; f < FRAMES; f++) begin
      longint sr[], si[];
      sr = new[N];
      si = new[N];
      for (int n = 0; n < N; n++) begin
        if (f < 2) begin
          xr[f][n] = longint'($urandom_range(0, 2 * AMP)) - AMP;
          xi[f][n] = longint'($urandom_range(0, 2 * AMP)) - AMP;
        end else begin
          xr[f][n] = AMP;
          xi[f][n] = (n % 3 == 0) ? -AMP : AMP;
        end
        sr[n] = xr[f][n];
        si[n] = xi[f][n];
      end
      for (int s = 0; s < STAGES; s++) ref_stage(sr, si, N, s);
      for (int c = 0; c < N; c++) begin
        er[f][c] = sr[c];
        ei[f][c] = si[c];
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 0 && $urandom_range(0, 7) == 0) begin
          in_valid <= 1'b0;
          ngaps++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= to_cvec(xr[f][n], xi[f][n]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;

    wait (nout == FRAMES * N);
    repeat (50) @(posedge clk);
    checks++;
    if (nout != FRAMES * N) failures++;
    for (int s = 0; s < STAGES; s++) begin
      checks++;
      if (swaps[s] != FRAMES || fires[s] != FRAMES * N / 4) begin
        failures++;
        $display("stage %0d: %0d frames, %0d butterfly sets", s, swaps[s], fires[s]);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (sel_seen[s][k] != FRAMES * N / 4) failures++;
      end
    end
    checks++;
    if (nneg == 0 || ngaps == 0) failures++;
    $display("frames %0d, input gaps %0d, negative results %0d, max DFT error %f",
             FRAMES, ngaps, nneg, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
