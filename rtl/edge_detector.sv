// edge_detector: streaming Sobel edge detector for an RGB video stream.
// The algorithm is split into small data-flow stages of similar delay with a
// register between each (pipeline balancing), so the clock period is set by
// the slowest small stage rather than by the whole chain:
//   rgb2gray (1 cycle) -> line buffers (1) -> 3x3 window (1)
//   -> Sobel sums (1) -> Sobel differences (1) -> |Gx|,|Gy| (1)
//   -> add, threshold, switch (1)
// The line buffers are either registers (USE_RAM = 0, the faster, larger
// version, default) or RAM (USE_RAM = 1, the smaller, slower version).
// Interface: one RGB pixel per cycle when in_valid is high, raster order,
// in_sof on the first pixel of each frame; idle cycles between pixels are
// allowed, there is no back-pressure. Only pixels whose 3x3 neighbourhood lies
// inside the frame give a result: (WIDTH-2) x (HEIGHT-2) results per frame,
// in raster order, out_sof on the first, out_eol on the last of each row.
// Timing: the result for the window centred on (x-1, y-1) appears 7 cycles
// after pixel (x, y) entered. Frame borders are dropped by this design's
// choice; the stage split and the two buffer variants follow the reference.
module edge_detector
  import edge_pkg::*;
#(
  parameter int WIDTH   = 800,
  parameter int HEIGHT  = 600,
  parameter bit USE_RAM = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  rgb_t in_rgb,
  input  mag_t threshold,
  output logic out_valid,
  output logic out_sof,
  output logic out_eol,
  output logic out_edge,
  output mag_t out_mag
);
  logic  g_valid, g_sof;
  pix_t  g_pix;
  logic  c_valid, c_sof;
  col_t  c_col;
  logic  w_valid, w_sof, w_eol;
  win_t  w_win;
  logic  s_valid, s_sof, s_eol;
  grad_t s_gx, s_gy;

  rgb2gray u_gray (
    .clk, .rst_n,
    .in_valid (in_valid), .in_sof (in_sof), .in_rgb (in_rgb),
    .out_valid(g_valid),  .out_sof(g_sof),  .out_gray(g_pix)
  );

  if (USE_RAM) begin : g_ram
    linebuf_ram #(.WIDTH(WIDTH)) u_lb (
      .clk, .rst_n,
      .in_valid (g_valid), .in_sof (g_sof), .in_pix (g_pix),
      .out_valid(c_valid), .out_sof(c_sof), .out_col(c_col)
    );
  end else begin : g_reg
    linebuf_reg #(.WIDTH(WIDTH)) u_lb (
      .clk, .rst_n,
      .in_valid (g_valid), .in_sof (g_sof), .in_pix (g_pix),
      .out_valid(c_valid), .out_sof(c_sof), .out_col(c_col)
    );
  end

  window3x3 #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_win (
    .clk, .rst_n,
    .in_valid (c_valid), .in_sof (c_sof), .in_col (c_col),
    .out_valid(w_valid), .out_sof(w_sof), .out_eol(w_eol), .out_win(w_win)
  );

  sobel u_sobel (
    .clk, .rst_n,
    .in_valid (w_valid), .in_sof (w_sof), .in_eol (w_eol), .in_win(w_win),
    .out_valid(s_valid), .out_sof(s_sof), .out_eol(s_eol), .out_gx(s_gx), .out_gy(s_gy)
  );

  grad_thresh u_grad (
    .clk, .rst_n,
    .in_valid (s_valid), .in_sof (s_sof), .in_eol (s_eol),
    .in_gx    (s_gx),    .in_gy  (s_gy),  .threshold(threshold),
    .out_valid, .out_sof, .out_eol, .out_edge, .out_mag
  );

  // Stream rules: frame and row flags only ever accompany a valid result.
  a_sof_valid: assert property (@(posedge clk) disable iff (!rst_n) out_sof |-> out_valid);
  a_eol_valid: assert property (@(posedge clk) disable iff (!rst_n) out_eol |-> out_valid);
  a_in_sof:    assert property (@(posedge clk) disable iff (!rst_n) w_sof |-> w_valid);
endmodule
