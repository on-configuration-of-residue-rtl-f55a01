// tb_rns_scaler: self-checking test of the residue scaler.
//
// Drives signed numbers spread over the whole dynamic range (both ends, zero,
// small values of either sign, random values), in bursts with gaps, and checks
// every result against floor((X + r)/K) computed with 64-bit integers, as
// well as the 8-cycle latency.
module tb_rns_scaler;
  import mqrns_pkg::*;
  import mqrns_tb_pkg::*;

  localparam int LATENCY = NMOD + 1;
  localparam int NVEC    = 3000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  rvec_t in_x = '0;
  logic  out_valid;
  rvec_t out_y;

  rns_scaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nneg = 0;
  longint exp_q[$];
  int     t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint pick(int k);
    longint h;
    h = longint'(HALF_M);
    case (k)
      0: return h;
      1: return -h;
      2: return 0;
      3: return -1;
      4: return h - 1;
      5: return -h + 1;
      default: begin
        case ($urandom_range(0, 2))
          0: return longint'($urandom_range(0, 20000)) - 10000;
          1: return (longint'($urandom) * 97 + longint'($urandom_range(0, 96))) % h
                    * (($urandom_range(0, 1) == 1) ? 1 : -1);
          default: return longint'($signed($urandom)) * 64;
        endcase
      end
    endcase
  endfunction

  // compare outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      int t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (out_y !== to_rvec(e)) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d expected %0d", from_rvec(out_y), e);
        end
        if (cycle - t != LATENCY) begin
          failures++;
          if (failures < 10) $display("latency %0d expected %0d", cycle - t, LATENCY);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      longint x;
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      x = pick(n);
      if (x < 0) nneg++;
      in_valid <= 1'b1;
      in_x     <= to_rvec(x);
      exp_q.push_back(scale_ref(x));
      t_q.push_back(cycle + 1);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || nneg == 0) begin
      failures++;
      $display("outputs missing: %0d, negative inputs: %0d", exp_q.size(), nneg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
