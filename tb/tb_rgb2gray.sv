// tb_rgb2gray: drives random RGB pixels with random gaps and checks each gray
// value, its one-cycle latency and the start-of-frame flag against
// (R + 2G + B) / 4 worked out here.
module tb_rgb2gray;
  import edge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  rgb_t in_rgb = '0;
  logic out_valid, out_sof;
  pix_t out_gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    logic exp_v, exp_sof;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sof   = ($urandom_range(0, 7) == 0);
      in_rgb   = rgb_t'($urandom);
      if (i < 4) in_rgb = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};
      exp   = (int'(in_rgb.r) + 2*int'(in_rgb.g) + int'(in_rgb.b)) / 4;
      exp_v = in_valid;
      exp_sof = in_valid & in_sof;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v || out_sof !== exp_sof || (exp_v && int'(out_gray) != exp)) begin
        failures++;
        $display("mismatch rgb=%h v=%b gray=%0d exp=%0d", in_rgb, out_valid, out_gray, exp);
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
