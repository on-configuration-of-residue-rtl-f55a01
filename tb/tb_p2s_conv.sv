// tb_p2s_conv: self-checking test of the parallel-to-serial converter.
//
// Sets of eight random residue vectors are offered four to seven cycles
// apart, with unrelated values on the inputs in between. The test checks that Re_k/Im_k reach the scaler outputs exactly
// DELAY + k cycles after their set, in the order k = 0..3, with the matching
// multiplexer setting, and that nothing else is marked valid.
module tb_p2s_conv;
  import mqrns_pkg::*;

  localparam int DELAY = 4;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  rvec_t      in_re [4], in_im [4];
  logic       out_valid;
  logic [1:0] out_sel;
  rvec_t      out_re, out_im;

  p2s_conv #(.DELAY(DELAY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { rvec_t re; rvec_t im; int k; int t; } exp_t;
  exp_t exp_q[$];
  int sel_seen[4];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rvec_t rnd_vec();
    rvec_t v;
    for (int i = 0; i < NMOD; i++) v[i] = res_t'($urandom_range(0, MODULI[i] - 1));
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        sel_seen[out_sel]++;
        if (out_re !== e.re || out_im !== e.im || int'(out_sel) != e.k || cycle - e.t != DELAY + e.k) begin
          failures++;
          if (failures < 10)
            $display("k=%0d sel=%0d dt=%0d data_ok=%0b", e.k, out_sel, cycle - e.t,
                     out_re === e.re && out_im === e.im);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) begin in_re[k] = '0; in_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      exp_t e;
      for (int k = 0; k < 4; k++) begin
        rvec_t r, i;
        r = rnd_vec(); i = rnd_vec();
        in_re[k] <= r; in_im[k] <= i;
        e.re = r; e.im = i; e.k = k; e.t = cycle + 1;
        exp_q.push_back(e);
      end
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      // idle cycles carry unrelated values, which must never reach the scalers
      repeat ($urandom_range(3, 6)) begin
        for (int k = 0; k < 4; k++) begin
          in_re[k] <= rnd_vec();
          in_im[k] <= rnd_vec();
        end
        @(posedge clk);
      end
    end
    repeat (DELAY + 8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (sel_seen[k] != 500) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
