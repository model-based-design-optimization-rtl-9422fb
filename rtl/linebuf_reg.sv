// linebuf_reg: register-based line buffering (Implementation I of the
// reference design, which stores image lines in registers instead of RAM to
// get the shortest critical path at the cost of area).
// Two lines of WIDTH pixels are kept in one 2*WIDTH-deep shift register that
// advances on every valid pixel. The taps at depth WIDTH and 2*WIDTH give the
// pixels one and two rows above the incoming pixel in the same column.
// Interface: in_valid/in_pix/in_sof stream in raster order, no back-pressure.
// out_col[2] is the incoming pixel, out_col[1] the one a row above and
// out_col[0] the one two rows above (undefined content during the first two
// rows of a frame; the window stage discards those). Timing: outputs are
// registered, one cycle after the input. The shift structure is this
// design's choice; the reference only says registers are used.
module linebuf_reg
  import edge_pkg::*;
#(
  parameter int WIDTH = 800
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  pix_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output col_t out_col
);
  pix_t line [2*WIDTH];   // [0] newest, [WIDTH-1] one row up, [2*WIDTH-1] two rows up

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line[0] <= in_pix;
      for (int i = 1; i < 2*WIDTH; i++) line[i] <= line[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      if (in_valid) out_col <= {in_pix, line[WIDTH-1], line[2*WIDTH-1]};
    end
  end
endmodule
