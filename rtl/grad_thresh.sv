// grad_thresh: gradient magnitude, threshold and output switch.
// The exact magnitude sqrt(Gx^2 + Gy^2) is replaced by |Gx| + |Gy|, which
// needs two absolute values and one adder instead of squares and a square
// root. The magnitude is compared with a run-time threshold and a switch
// selects the binary edge output (1 = edge). The reference design gives the
// approximation and the threshold/switch structure; the threshold value and
// the strict "greater than" comparison are this design's choice.
// Pipeline: stage 1 registers |Gx| and |Gy| (the absolute value is the
// longest single operation on this path), stage 2 registers the sum, the
// comparison and the switch. Timing: two cycles, one result per cycle.
// Interface: in_gx/in_gy signed in [-1020, 1020]; out_mag in [0, 2040].
module grad_thresh
  import edge_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  logic  in_eol,
  input  grad_t in_gx,
  input  grad_t in_gy,
  input  mag_t  threshold,
  output logic  out_valid,
  output logic  out_sof,
  output logic  out_eol,
  output logic  out_edge,
  output mag_t  out_mag
);
  mag_t ax_q, ay_q, mag;
  logic v1, sof1, eol1;

  always_comb mag = ax_q + ay_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ax_q <= '0; ay_q <= '0;
      v1 <= 1'b0; sof1 <= 1'b0; eol1 <= 1'b0;
      out_mag <= '0; out_edge <= 1'b0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0;
    end else begin
      // stage 1: absolute values
      ax_q <= in_gx[GRAD_W-1] ? mag_t'(-in_gx) : mag_t'(in_gx);
      ay_q <= in_gy[GRAD_W-1] ? mag_t'(-in_gy) : mag_t'(in_gy);
      v1   <= in_valid;
      sof1 <= in_valid & in_sof;
      eol1 <= in_valid & in_eol;
      // stage 2: add, compare, switch
      out_mag   <= mag;
      out_edge  <= (mag > threshold) ? 1'b1 : 1'b0;
      out_valid <= v1;
      out_sof   <= sof1;
      out_eol   <= eol1;
    end
  end
endmodule
