// tb_twiddle_gen: self-checking test of the twiddle generator.
//
// Two instances: the second stage of a 1024-point transform (L = 64) and a
// 64-point transform (L = 4, coarse table steps). For every group index the
// four twiddles, one cycle after the index, are compared with
// round(K*cos), -round(K*sin) computed with $cos/$sin and reduced per modulus.
module tb_twiddle_gen;
  import mqrns_pkg::*;
  import mqrns_tb_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] grp_a = '0;
  logic [1:0] grp_b = '0;
  rvec_t wa_re [4], wa_im [4], wb_re [4], wb_im [4];

  twiddle_gen #(.N(1024), .L(64)) dut_a (.clk, .grp(grp_a), .w_re(wa_re), .w_im(wa_im));
  twiddle_gen #(.N(64),   .L(4))  dut_b (.clk, .grp(grp_b), .w_re(wb_re), .w_im(wb_im));

  int checks = 0, failures = 0;
  int nneg = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, rvec_t g_re, rvec_t g_im, int e, int n);
    checks++;
    if (tw_re(e, n) < 0 || tw_im(e, n) < 0) nneg++;
    if (g_re !== to_rvec(tw_re(e, n)) || g_im !== to_rvec(tw_im(e, n))) begin
      failures++;
      if (failures < 10)
        $display("%s e=%0d: got (%0d,%0d) expected (%0d,%0d)", tag, e,
                 from_rvec(g_re), from_rvec(g_im), tw_re(e, n), tw_im(e, n));
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      grp_a <= 6'(i);
      grp_b <= 2'(i % 4);
      @(posedge clk);   // index sampled
      @(negedge clk);   // twiddles registered
      for (int k = 0; k < 4; k++) begin
        check("L64", wa_re[k], wa_im[k], k * i * (1024 / 256), 1024);
        if (i < 4) check("N64", wb_re[k], wb_im[k], k * i * (64 / 16), 64);
      end
    end
    checks++;
    if (nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
