// sobel: multiplier-free Sobel filter. With the kernels
//     Gx = [-1 0 1; -2 0 2; -1 0 1]     Gy = [-1 -2 -1; 0 0 0; 1 2 1]
// six of the eighteen products are by zero and are dropped, the weights +-1
// need no multiplier and the weight 2 is a one-bit left shift. Grouping the
// terms of equal sign gives four weighted sums (right and left columns, bottom
// and top rows) of two adds each, and two subtractions: ten adders in all and
// no multiplier, which is the operation reduction the reference design
// applies to this filter. The kernel orientation (Gx = right minus left,
// Gy = bottom minus top) is the usual one and this design's choice.
// Pipeline: stage 1 registers the four weighted sums, stage 2 the two
// differences, so the adder chain is cut in two balanced halves.
// Interface: in_win[r][c], r = 0 top row, c = 0 left column; out_gx/out_gy
// signed, in [-1020, 1020]. Timing: results two cycles after the window,
// one result per cycle.
module sobel
  import edge_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  logic  in_eol,
  input  win_t  in_win,
  output logic  out_valid,
  output logic  out_sof,
  output logic  out_eol,
  output grad_t out_gx,
  output grad_t out_gy
);
  typedef logic [PIX_W+1:0] wsum_t;   // p + 2q + r <= 1020, 10 bits

  // p + 2q + r: the two unit-weight terms share one add before the doubled
  // middle term is added, so no multiplier is needed for either weight.
  function automatic wsum_t wsum(pix_t p, pix_t q, pix_t r);
    return (wsum_t'(p) + wsum_t'(r)) + {1'b0, q, 1'b0};
  endfunction

  wsum_t right_q, left_q, bottom_q, top_q;
  logic  v1, sof1, eol1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      right_q <= '0; left_q <= '0; bottom_q <= '0; top_q <= '0;
      v1 <= 1'b0; sof1 <= 1'b0; eol1 <= 1'b0;
      out_gx <= '0; out_gy <= '0;
      out_valid <= 1'b0; out_sof <= 1'b0; out_eol <= 1'b0;
    end else begin
      // stage 1: weighted column and row sums
      right_q  <= wsum(in_win[0][2], in_win[1][2], in_win[2][2]);
      left_q   <= wsum(in_win[0][0], in_win[1][0], in_win[2][0]);
      bottom_q <= wsum(in_win[2][0], in_win[2][1], in_win[2][2]);
      top_q    <= wsum(in_win[0][0], in_win[0][1], in_win[0][2]);
      v1   <= in_valid;
      sof1 <= in_valid & in_sof;
      eol1 <= in_valid & in_eol;
      // stage 2: differences
      out_gx <= grad_t'(right_q) - grad_t'(left_q);
      out_gy <= grad_t'(bottom_q) - grad_t'(top_q);
      out_valid <= v1;
      out_sof   <= sof1;
      out_eol   <= eol1;
    end
  end
endmodule
