// tb_unroll_accum: runs the three unrolling options side by side (1, 2 and 4
// adders) on the same random operands and checks the sum and the latency:
// 4, 2 and 1 cycles from the start edge to done.
module tb_unroll_accum;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [3:0][15:0] data = '0;
  logic [2:0] busy, done;
  logic [2:0][17:0] sum;
  int checks = 0, failures = 0;
  localparam int OPT [3] = '{1, 2, 4};

  for (genvar g = 0; g < 3; g++) begin : g_opt
    unroll_accum #(.N(4), .ADDERS(OPT[g]), .DW(16)) dut (
      .clk, .rst_n, .start, .data, .busy(busy[g]), .done(done[g]), .sum(sum[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, lat [3];
    bit seen [3];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) data[k] = 16'($urandom);
      if (t == 0) data = {4{16'hFFFF}};
      exp = 0;
      for (int k = 0; k < 4; k++) exp += int'(data[k]);
      start = 1'b1;
      seen = '{0, 0, 0};
      lat = '{0, 0, 0};
      for (int c = 1; c <= 6; c++) begin
        @(posedge clk); #1;
        start = 1'b0;
        data = '0;            // operands must have been captured at start
        for (int g = 0; g < 3; g++)
          if (done[g] && !seen[g]) begin
            seen[g] = 1'b1;
            lat[g] = c;
            checks++;
            if (int'(sum[g]) != exp) begin
              failures++;
              $display("mismatch adders=%0d sum=%0d exp=%0d", OPT[g], sum[g], exp);
            end
          end
      end
      for (int g = 0; g < 3; g++) begin
        checks++;
        if (!seen[g] || lat[g] != 4 / OPT[g]) begin
          failures++;
          $display("latency adders=%0d got %0d exp %0d", OPT[g], lat[g], 4 / OPT[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
