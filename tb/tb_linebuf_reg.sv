// tb_linebuf_reg: streams three small frames of random pixels with random
// gaps into the register line buffer and checks, one cycle after each valid
// pixel, that the column holds that pixel and the pixels one and two rows
// above it, taken from a copy of the frame kept here.
module tb_linebuf_reg;
  import edge_pkg::*;
  localparam int W = 7, H = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  pix_t in_pix = '0;
  logic out_valid, out_sof;
  col_t out_col;
  int checks = 0, failures = 0;

  linebuf_reg #(.WIDTH(W)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
            @(negedge clk);
            checks++;
            if (out_valid !== 1'b0) failures++;
          end
          @(negedge clk);
          img[y][x] = pix_t'($urandom);
          in_valid = 1'b1;
          in_sof   = (x == 0 && y == 0);
          in_pix   = img[y][x];
          @(negedge clk);
          in_valid = 1'b0;
          checks++;
          if (!out_valid || out_sof !== (x == 0 && y == 0) || out_col[2] !== img[y][x] ||
              (y >= 1 && out_col[1] !== img[y-1][x]) || (y >= 2 && out_col[0] !== img[y-2][x])) begin
            failures++;
            $display("mismatch f=%0d y=%0d x=%0d col=%p", f, y, x, out_col);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
