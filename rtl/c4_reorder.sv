// c4_reorder: commutator in front of a butterfly stage.
//
// A radix-4 butterfly of a stage whose butterflies span 4L points needs the
// four numbers x[b*4L + i + p*L], p = 0..3, together, while the stream in
// front of it carries one complex number per clock in another order. This
// block stores whole frames of N numbers in a two-bank (ping-pong) memory:
// while one bank is written, the other, complete, frame is read out.
//
// Both sides use the same address map. Counting numbers c = 4g + p within a
// frame, with g = b*L + i, the in-place position is
//     addr(c, L) = b*4L + p*L + i.
// The writer uses it with WR_L, the quarter span of the previous stage (whose
// butterfly emits its four results one after another), or stores in natural
// order if WR_L = 0 (first stage). The reader uses it with RD_L, this stage's
// quarter span, one read per clock; four reads are gathered and handed on as
// one butterfly input set, so out_valid pulses once every four clocks.
// The frame-buffer form of the commutator is this design's choice.
//
// Interface: in_valid/in_data, one number per clock at most, gaps allowed.
// out_valid/out_x[0..3] with out_grp = i (twiddle index). bank_swap pulses when
// a frame is complete and its read-out starts. Latency from the last number of
// a frame to the first butterfly set: 5 clocks. Synchronous active-low reset.
module c4_reorder
  import mqrns_pkg::*;
#(
  parameter int N    = 1024,  // frame (transform) length
  parameter int WR_L = 0,     // quarter span of the writer, 0 = natural order
  parameter int RD_L = 256    // quarter span of the reader
)(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  cvec_t                                in_data,
  output logic                                 out_valid,
  output cvec_t                                out_x [4],
  output logic [$clog2(RD_L > 1 ? RD_L : 2)-1:0] out_grp,
  output logic                                 bank_swap
);
  localparam int AW = $clog2(N);
  localparam int GW = $clog2(RD_L > 1 ? RD_L : 2);

  typedef logic [AW-1:0] addr_t;

  function automatic addr_t in_place(addr_t c, int l);
    addr_t g, b, i;
    logic [1:0] p;
    g = c >> 2;
    p = c[1:0];
    b = g / addr_t'(l);
    i = g % addr_t'(l);
    return addr_t'(b * addr_t'(4 * l) + addr_t'(p) * addr_t'(l) + i);
  endfunction

  cvec_t mem [2 * N];

  // ------------------------------------------------------------- write side
  addr_t wcnt;
  logic  wbank;
  addr_t waddr;
  assign waddr = (WR_L == 0) ? wcnt : in_place(wcnt, WR_L);

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, waddr}] <= in_data;
  end

  logic frame_done;
  assign frame_done = in_valid && (wcnt == addr_t'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt  <= '0;
      wbank <= 1'b0;
    end else if (in_valid) begin
      wcnt <= wcnt + 1'b1;
      if (frame_done) wbank <= ~wbank;
    end
  end

  // -------------------------------------------------------------- read side
  logic  rd_active, rbank;
  addr_t rcnt;
  cvec_t rdata;
  logic  rdv;
  logic [1:0] rdp;
  addr_t rdg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rcnt      <= '0;
      rbank     <= 1'b0;
    end else begin
      if (rd_active) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == addr_t'(N - 1)) rd_active <= 1'b0;
      end
      if (frame_done) begin          // the bank just filled is read next
        rd_active <= 1'b1;
        rcnt      <= '0;
        rbank     <= wbank;
      end
    end
  end
  assign bank_swap = frame_done;

  always_ff @(posedge clk) begin
    rdata <= mem[{rbank, in_place(rcnt, RD_L)}];
    rdp   <= rcnt[1:0];
    rdg   <= rcnt >> 2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rdv <= 1'b0;
    else        rdv <= rd_active;
  end

  // ----------------------------------------- gather four reads into one set
  cvec_t gath [3];
  always_ff @(posedge clk) begin
    if (rdv && rdp != 2'd3) gath[rdp] <= rdata;
    if (rdv && rdp == 2'd3) begin
      out_x[0] <= gath[0];
      out_x[1] <= gath[1];
      out_x[2] <= gath[2];
      out_x[3] <= rdata;
      out_grp  <= GW'(rdg % addr_t'(RD_L));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= rdv && (rdp == 2'd3);
  end

  // a new frame may only complete once the previous one has been read out
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      frame_done |-> (!rd_active || rcnt == addr_t'(N - 1)))
    else $error("c4_reorder: frame completed before the previous one was read");

endmodule
