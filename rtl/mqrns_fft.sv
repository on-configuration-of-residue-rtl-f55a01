// mqrns_fft: pipelined radix-4 FFT processor in the modified quadratic residue
// number system (MQRNS).
//
// A length-N transform (N a power of four) runs through log4(N) identical
// stages (five for N = 1024). Every stage holds one radix-4 butterfly per
// modulus (seven channels), a parallel-to-serial converter and just two
// residue scalers, which bring each result back to range by dividing by the
// twiddle scaling constant K. The datapath works on residues only: the input
// is expected in residue form (signed integers, real and imaginary part, each
// reduced modulo the seven moduli) and the output is the DFT, approximately
// X[k] = sum_n x[n] exp(-2*pi*j*n*k/N) (the K factors cancel), in residue form.
//
// Ordering: input samples arrive in natural order, one per clock, frames of N
// back to back (gaps allowed). Outputs leave in radix-4 digit-reversed order,
// one per clock; out_bin gives the frequency index k of each output. Each stage
// buffers one frame, so the latency is about N clocks per stage.
//
// Status outputs per stage: bank_swap (frame complete, read-out starts),
// bf_fire (butterfly set issued), p2s_valid and mux_sel (converter
// multiplexers). The stage count and the streaming interface follow the
// processor; the interface signals are this design's choice.
module mqrns_fft
  import mqrns_pkg::*;
#(
  parameter int N = 1024   // transform length, a power of four, at most 1024
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  cvec_t                     in_data,
  output logic                      out_valid,
  output cvec_t                     out_data,
  output logic [$clog2(N)-1:0]      out_bin,
  output logic [$clog2(N)/2-1:0]    bank_swap,
  output logic [$clog2(N)/2-1:0]    bf_fire,
  output logic [$clog2(N)/2-1:0]    p2s_valid,
  output logic [$clog2(N)/2-1:0][1:0] mux_sel
);
  localparam int STAGES = $clog2(N) / 2;
  localparam int AW     = $clog2(N);

  logic  s_valid [STAGES + 1];
  cvec_t s_data  [STAGES + 1];

  assign s_valid[0] = in_valid;
  assign s_data[0]  = in_data;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    fft_stage #(.N(N), .STAGE(s)) u_stage (
      .clk, .rst_n,
      .in_valid(s_valid[s]),   .in_data(s_data[s]),
      .out_valid(s_valid[s+1]), .out_data(s_data[s+1]),
      .bank_swap(bank_swap[s]), .bf_fire(bf_fire[s]),
      .p2s_valid(p2s_valid[s]), .mux_sel(mux_sel[s])
    );
  end

  assign out_valid = s_valid[STAGES];
  assign out_data  = s_data[STAGES];

  // frequency index of each output: base-4 digit reversal of its position
  logic [AW-1:0] ocnt;
  always_ff @(posedge clk) begin
    if (!rst_n)         ocnt <= '0;
    else if (out_valid) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int d = 0; d < STAGES; d++)
      out_bin[2*d +: 2] = ocnt[2*(STAGES-1-d) +: 2];
  end

endmodule
