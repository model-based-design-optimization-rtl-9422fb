// tb_sobel: applies random and extreme 3x3 windows, one per cycle with random
// gaps, and compares Gx and Gy two cycles later with the full 3x3 kernel
// products (with multiplications) computed here.
module tb_sobel;
  import edge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_eol = 1'b0;
  win_t in_win = '0;
  logic out_valid, out_sof, out_eol;
  grad_t out_gx, out_gy;
  int checks = 0, failures = 0;

  sobel dut (.*);

  always #5 clk = ~clk;

  localparam int KX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int KY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  int q_gx[$], q_gy[$];
  logic q_v[$], q_sof[$], q_eol[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference queue: results expected two cycles after each input cycle.
  always @(negedge clk) if (rst_n) begin
    int gx, gy;
    gx = 0; gy = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        gx += KX[r][c] * int'(in_win[r][c]);
        gy += KY[r][c] * int'(in_win[r][c]);
      end
    q_gx.push_back(gx); q_gy.push_back(gy);
    q_v.push_back(in_valid); q_sof.push_back(in_valid & in_sof); q_eol.push_back(in_valid & in_eol);
    if (q_v.size() > 2) begin
      int egx, egy;
      logic ev, es, ee;
      egx = q_gx.pop_front(); egy = q_gy.pop_front();
      ev = q_v.pop_front(); es = q_sof.pop_front(); ee = q_eol.pop_front();
      checks++;
      if (out_valid !== ev || out_sof !== es || out_eol !== ee ||
          (ev && (int'(out_gx) != egx || int'(out_gy) != egy))) begin
        failures++;
        $display("mismatch gx=%0d/%0d gy=%0d/%0d v=%b/%b", out_gx, egx, out_gy, egy, out_valid, ev);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(0, 4) != 0);
      in_sof = ($urandom_range(0, 9) == 0);
      in_eol = ($urandom_range(0, 9) == 0);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (i % 8)
            0: in_win[r][c] = (c == 2) ? 8'hFF : 8'h00;   // Gx = +1020
            1: in_win[r][c] = (c == 0) ? 8'hFF : 8'h00;   // Gx = -1020
            2: in_win[r][c] = (r == 2) ? 8'hFF : 8'h00;   // Gy = +1020
            3: in_win[r][c] = (r == 0) ? 8'hFF : 8'h00;   // Gy = -1020
            default: in_win[r][c] = pix_t'($urandom);
          endcase
    end
    @(posedge clk); #1 in_valid = 1'b0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
