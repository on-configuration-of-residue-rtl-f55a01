// tb_c4_reorder: self-checking test of the commutator.
//
// Configured as the second stage of a 64-point transform: the writer stream
// is grouped with quarter span 16 (the order the first stage emits), the
// reader with quarter span 4. Each input carries its own in-place position as
// data. Three frames are sent, with random gaps and back to back; every
// butterfly set must hold positions b*16 + i + p*4 (p = 0..3) in group order,
// with the right group index, one set per four clocks, starting five clocks
// after the last number of its frame (seen six samples later here, since
// bank_swap is sampled in the cycle of that last number).
module tb_c4_reorder;
  import mqrns_pkg::*;
  import mqrns_tb_pkg::*;

  localparam int N = 64, WR_L = 16, RD_L = 4;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  cvec_t      in_data = '0;
  logic       out_valid;
  cvec_t      out_x [4];
  logic [1:0] out_grp;
  logic       bank_swap;

  c4_reorder #(.N(N), .WR_L(WR_L), .RD_L(RD_L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, swaps = 0;
  int ngrp = 0, last_out = -100, done_t[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // position tag carried in the real part, frame number in the imaginary part
  always @(posedge clk) begin
    if (rst_n && bank_swap) begin
      swaps++;
      done_t.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      int g, f;
      g = ngrp % (N / 4);
      f = ngrp / (N / 4);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (out_x[p] !== to_cvec(in_place(4 * g + p, RD_L), f)) begin
          failures++;
          if (failures < 10) $display("group %0d p %0d got pos %0d", g, p, from_rvec(out_x[p].re));
        end
      end
      checks++;
      if (int'(out_grp) != g % RD_L) failures++;
      checks++;
      if (g == 0) begin
        if (done_t.size() == 0 || cycle - done_t[0] != 6) begin
          failures++;
          $display("first set of frame %0d not 5 cycles after frame end (%0d)", f, cycle - done_t[0]);
        end
        if (done_t.size() != 0) void'(done_t.pop_front());
      end else if (cycle - last_out != 4) begin
        failures++;
        $display("sets not 4 cycles apart");
      end
      last_out = cycle;
      ngrp++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int c = 0; c < N; c++) begin
        if (f == 0 && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= to_cvec(in_place(c, WR_L), f);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (N + 20) @(posedge clk);
    checks++;
    if (ngrp != 3 * N / 4 || swaps != 3) begin
      failures++;
      $display("groups %0d swaps %0d", ngrp, swaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
