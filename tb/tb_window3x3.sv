// tb_window3x3: feeds two small frames of columns (random gaps, random pixel
// values) and checks that a window comes out exactly for every position whose
// 3x3 neighbourhood is inside the frame, one cycle after the column that
// completes it, with the right nine pixels and the sof/eol flags.
module tb_window3x3;
  import edge_pkg::*;
  localparam int W = 6, H = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  col_t in_col = '0;
  logic out_valid, out_sof, out_eol;
  win_t out_win;
  int checks = 0, failures = 0, windows = 0;

  window3x3 #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_t img [H][W];
    logic exp_v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
            @(negedge clk);
            checks++;
            if (out_valid !== 1'b0) failures++;
          end
          @(negedge clk);
          img[y][x] = pix_t'($urandom);
          in_valid  = 1'b1;
          in_sof    = (x == 0 && y == 0);
          // column: [2] current row, [1] row above, [0] two rows above
          in_col[2] = img[y][x];
          in_col[1] = (y >= 1) ? img[y-1][x] : pix_t'($urandom);
          in_col[0] = (y >= 2) ? img[y-2][x] : pix_t'($urandom);
          @(negedge clk);
          in_valid = 1'b0;
          exp_v = (x >= 2 && y >= 2);
          checks++;
          if (out_valid !== exp_v || out_sof !== (x == 2 && y == 2) ||
              out_eol !== (exp_v && x == W-1)) begin
            failures++;
            $display("mismatch flags y=%0d x=%0d v=%b sof=%b eol=%b", y, x, out_valid, out_sof, out_eol);
          end
          if (exp_v) begin
            windows++;
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++) begin
                checks++;
                if (out_win[r][c] !== img[y-2+r][x-2+c]) begin
                  failures++;
                  $display("mismatch win y=%0d x=%0d r=%0d c=%0d", y, x, r, c);
                end
              end
          end
        end
    checks++;
    if (windows != 2*(W-2)*(H-2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
