// tb_bf4_mqrns: self-checking test of the single-channel radix-4 butterfly.
//
// Uses the channel modulo 59, a modulus for which -1 has no square root, so
// the MQRNS path (J^2 = -77) is exercised. Random inputs and twiddles are fed
// in a stream with gaps; each result is compared with the complex radix-4 sum
// times the twiddle computed directly modulo 59 (ac - bd, ad + bc), and the
// 3-cycle latency is checked.
module tb_bf4_mqrns;
  import mqrns_pkg::*;

  localparam int unsigned MOD = 59;
  localparam int LATENCY = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  res_t x_re [4], x_im [4], w_re [4], w_im [4];
  logic out_valid;
  res_t y_re [4], y_im [4];

  bf4_mqrns #(.MOD(MOD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { int re[4]; int im[4]; int t; } exp_t;
  exp_t exp_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int md(int v);
    int r;
    r = v % int'(MOD);
    return (r < 0) ? r + int'(MOD) : r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++; checks++;
      end else begin
        e = exp_q.pop_front();
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(y_re[k]) != e.re[k] || int'(y_im[k]) != e.im[k]) begin
            failures++;
            if (failures < 10)
              $display("y%0d: got (%0d,%0d) expected (%0d,%0d)", k, y_re[k], y_im[k], e.re[k], e.im[k]);
          end
        end
        checks++;
        if (cycle - e.t != LATENCY) begin
          failures++;
          $display("latency %0d", cycle - e.t);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      x_re[k] = '0; x_im[k] = '0; w_re[k] = '0; w_im[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int a[4], b[4], c[4], d[4], sr[4], si[4];
      exp_t e;
      if ($urandom_range(0, 5) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        a[k] = $urandom_range(0, MOD - 1); b[k] = $urandom_range(0, MOD - 1);
        c[k] = $urandom_range(0, MOD - 1); d[k] = $urandom_range(0, MOD - 1);
        x_re[k] <= res_t'(a[k]); x_im[k] <= res_t'(b[k]);
        w_re[k] <= res_t'(c[k]); w_im[k] <= res_t'(d[k]);
      end
      sr[0] = a[0] + a[1] + a[2] + a[3];  si[0] = b[0] + b[1] + b[2] + b[3];
      sr[1] = a[0] + b[1] - a[2] - b[3];  si[1] = b[0] - a[1] - b[2] + a[3];
      sr[2] = a[0] - a[1] + a[2] - a[3];  si[2] = b[0] - b[1] + b[2] - b[3];
      sr[3] = a[0] - b[1] - a[2] + b[3];  si[3] = b[0] + a[1] - b[2] - a[3];
      for (int k = 0; k < 4; k++) begin
        e.re[k] = md(md(sr[k]) * c[k] - md(si[k]) * d[k]);
        e.im[k] = md(md(sr[k]) * d[k] + md(si[k]) * c[k]);
      end
      e.t = cycle + 1;
      exp_q.push_back(e);
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
