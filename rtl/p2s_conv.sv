// p2s_conv: parallel-to-serial converter between a butterfly stage and its
// two residue scalers.
//
// A butterfly stage delivers four complex results at once, i.e. eight real
// residue numbers Re0..Re3, Im0..Im3 (each a vector over all channels). Rather
// than eight scalers, the numbers are delayed by different amounts and
// multiplexed, so that one scaler takes the real parts and one the imaginary
// parts, one complex number per clock. This follows the converter of the
// processor: the eight numbers enter a first register level, move one level
// further each clock, and after DELAY cycles MUX1/MUX2 start passing Re0/Im0,
// then Re1/Im1 one cycle later, and so on. Path k holds DELAY+k register levels,
// so its output appears exactly when the multiplexers select it.
//
// Interface: in_valid marks a set of eight numbers; sets must be at least four
// cycles apart (checked by an assertion). out_valid is high for four cycles
// starting DELAY cycles after in_valid; out_sel is the multiplexer setting
// (index k of the number being passed). Registers shift every clock; a
// synchronous active-low reset clears only the valid pipe.
module p2s_conv
  import mqrns_pkg::*;
#(
  parameter int DELAY = 4            // cycles from in_valid to the first output
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  rvec_t      in_re [4],
  input  rvec_t      in_im [4],
  output logic       out_valid,
  output logic [1:0] out_sel,
  output rvec_t      out_re,     // to SCALER1
  output rvec_t      out_im      // to SCALER2
);
  localparam int VD = DELAY + 3;     // length of the valid delay line

  // per-path register chains of DELAY+k levels
  for (genvar k = 0; k < 4; k++) begin : g_path
    rvec_t re_q [DELAY + k];
    rvec_t im_q [DELAY + k];
    always_ff @(posedge clk) begin
      re_q[0] <= in_re[k];
      im_q[0] <= in_im[k];
      for (int l = 1; l < DELAY + k; l++) begin
        re_q[l] <= re_q[l-1];
        im_q[l] <= im_q[l-1];
      end
    end
  end

  // vd[l] is in_valid delayed by l+1 cycles
  logic [VD-1:0] vd;
  always_ff @(posedge clk) begin
    if (!rst_n) vd <= '0;
    else        vd <= {vd[VD-2:0], in_valid};
  end

  // multiplexer control: select path k while the set is DELAY+k cycles old
  always_comb begin
    out_valid = 1'b0;
    out_sel   = 2'd0;
    for (int k = 0; k < 4; k++) begin
      if (vd[DELAY-1+k]) begin
        out_valid = 1'b1;
        out_sel   = 2'(k);
      end
    end
  end

  // MUX1 / MUX2
  always_comb begin
    case (out_sel)
      2'd0:    begin out_re = g_path[0].re_q[DELAY-1]; out_im = g_path[0].im_q[DELAY-1]; end
      2'd1:    begin out_re = g_path[1].re_q[DELAY];   out_im = g_path[1].im_q[DELAY];   end
      2'd2:    begin out_re = g_path[2].re_q[DELAY+1]; out_im = g_path[2].im_q[DELAY+1]; end
      default: begin out_re = g_path[3].re_q[DELAY+2]; out_im = g_path[3].im_q[DELAY+2]; end
    endcase
  end

  // a new set may not arrive while the previous one is still being serialised
  property p_spacing;
    @(posedge clk) disable iff (!rst_n) in_valid |-> (vd[2:0] == 3'b000);
  endproperty
  a_spacing: assert property (p_spacing)
    else $error("p2s_conv: butterfly outputs closer than four cycles");

endmodule
