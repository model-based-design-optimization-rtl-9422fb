// rgb2gray: colour to grayscale conversion, the first processing stage of the
// edge detector. The reference design uses an unsigned-integer grayscale
// subsystem and no multipliers anywhere; the weights are this design's
// choice: gray = (R + 2*G + B) / 4, built from one shift and two adds, which
// stays close to the usual luminance weighting (green counts most) and cannot
// overflow 8 bits after the divide by four.
// Interface: one pixel per cycle when in_valid is high; in_sof marks the
// first pixel of a frame and travels with the data. Timing: the result and
// its flags are registered, one cycle after the input (a pipeline register
// between this stage and the next, as in the balanced pipeline).
module rgb2gray
  import edge_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  rgb_t in_rgb,
  output logic out_valid,
  output logic out_sof,
  output pix_t out_gray
);
  logic [PIX_W+1:0] sum;   // R + 2G + B fits in 10 bits

  always_comb
    sum = {2'b00, in_rgb.r} + {1'b0, in_rgb.g, 1'b0} + {2'b00, in_rgb.b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_gray  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      if (in_valid) out_gray <= pix_t'(sum >> 2);
    end
  end
endmodule
