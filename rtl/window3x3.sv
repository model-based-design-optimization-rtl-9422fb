// window3x3: builds the 3x3 neighbourhood P11..P33 used by the Sobel kernels
// from a stream of pixel columns, and decides which windows are valid.
// Each valid column is shifted in from the right: win[r][2] takes the new
// column, win[r][1] the previous one, win[r][0] the one before. A raster
// counter (x, y) of the incoming column tells where the window is: when the
// newest column is at (x, y) the window is centred on (x-1, y-1), and it lies
// fully inside the frame only when x >= 2 and y >= 2. Only those windows are
// passed on (out_valid); frame edges produce no output. How borders are
// handled is this design's own choice, as is resynchronising the counter on
// in_sof.
// Interface: in_col[2] is the newest row (bottom), [0] the oldest (top).
// out_win[r][c]: r = 0 top row, c = 0 left column. out_sof flags the first
// valid window of a frame, out_eol the last one of each row.
// Timing: registered, one cycle after the column that completes the window.
module window3x3
  import edge_pkg::*;
#(
  parameter int WIDTH  = 800,
  parameter int HEIGHT = 600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  col_t in_col,
  output logic out_valid,
  output logic out_sof,
  output logic out_eol,
  output win_t out_win
);
  localparam int XW = (WIDTH  > 1) ? $clog2(WIDTH)  : 1;
  localparam int YW = (HEIGHT > 1) ? $clog2(HEIGHT) : 1;

  logic [XW-1:0] x_q, x;
  logic [YW-1:0] y_q, y;
  win_t          win_q;

  // Position of the incoming column.
  always_comb begin
    x = in_sof ? '0 : x_q;
    y = in_sof ? '0 : y_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (in_valid) begin
      if (x == XW'(WIDTH-1)) begin
        x_q <= '0;
        y_q <= (y == YW'(HEIGHT-1)) ? '0 : y + 1'b1;
      end else begin
        x_q <= x + 1'b1;
      end
    end
  end

  // Window shift: columns enter on the right.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_q <= '0;
    end else if (in_valid) begin
      for (int r = 0; r < 3; r++) begin
        win_q[r][0] <= win_q[r][1];
        win_q[r][1] <= win_q[r][2];
        win_q[r][2] <= in_col[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else begin
      out_valid <= in_valid && x >= XW'(2) && y >= YW'(2);
      out_sof   <= in_valid && x == XW'(2) && y == YW'(2);
      out_eol   <= in_valid && x == XW'(WIDTH-1) && y >= YW'(2);
    end
  end

  assign out_win = win_q;
endmodule
