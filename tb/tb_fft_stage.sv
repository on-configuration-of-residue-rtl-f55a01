// tb_fft_stage: self-checking test of one processor stage.
//
// A 64-point transform, stage 1 (butterflies spanning 16 points, input stream
// in the order stage 0 emits it). Two frames of random complex integers are
// sent back to back; the outputs are compared, in stream order, with an
// integer model of the stage (exact radix-4 sums, exact products with the
// K-scaled twiddles, then floor((v + r)/K)). Also checked: 16 butterfly sets
// per frame, every converter multiplexer setting used, and the latency of
// 21 clocks from the end of a frame to its first result (observed 22
// samples after bank_swap).
module tb_fft_stage;
  import mqrns_pkg::*;
  import mqrns_tb_pkg::*;

  localparam int N = 64, STAGE = 1;
  localparam int LW = N >> (2 * STAGE);      // quarter span of the writer (stage 0)
  localparam int LR = N >> (2 * (STAGE + 1));

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cvec_t      in_data = '0;
  logic       out_valid;
  cvec_t      out_data;
  logic       bank_swap, bf_fire, p2s_valid;
  logic [1:0] mux_sel;

  fft_stage #(.N(N), .STAGE(STAGE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int nout = 0, nfire = 0, sel_seen[4], done_t[$];
  longint er[], ei[];          // expected results, frame after frame, stream order

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (bank_swap) done_t.push_back(cycle);
      if (bf_fire) nfire++;
      if (p2s_valid) sel_seen[mux_sel]++;
      if (out_valid) begin
        checks++;
        if (nout >= er.size() || out_data !== to_cvec(er[nout], ei[nout])) begin
          failures++;
          if (failures < 10)
            $display("out %0d: got (%0d,%0d) expected (%0d,%0d)", nout,
                     from_rvec(out_data.re), from_rvec(out_data.im), er[nout], ei[nout]);
        end
        if (nout % N == 0) begin
          checks++;
          if (done_t.size() == 0 || cycle - done_t[0] != 22) begin
            failures++;
            $display("latency wrong");
          end
          if (done_t.size() != 0) void'(done_t.pop_front());
        end
        nout++;
      end
    end
  end

  initial begin
    longint xr[], xi[];
    xr = new[N];
    xi = new[N];
    er = new[2 * N];
    ei = new[2 * N];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      longint sr[], si[];
      for (int n = 0; n < N; n++) begin
        xr[n] = longint'($urandom_range(0, 1 << 21)) - (1 << 20);
        xi[n] = longint'($urandom_range(0, 1 << 21)) - (1 << 20);
      end
      sr = xr;
      si = xi;
      ref_stage(sr, si, N, STAGE);
      for (int c = 0; c < N; c++) begin
        er[f * N + c] = sr[in_place(c, LR)];
        ei[f * N + c] = si[in_place(c, LR)];
      end
      for (int c = 0; c < N; c++) begin
        in_valid <= 1'b1;
        in_data  <= to_cvec(xr[in_place(c, LW)], xi[in_place(c, LW)]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (N + 60) @(posedge clk);
    checks++;
    if (nout != 2 * N || nfire != 2 * N / 4) begin
      failures++;
      $display("outputs %0d butterfly sets %0d", nout, nfire);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (sel_seen[k] != 2 * N / 4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
