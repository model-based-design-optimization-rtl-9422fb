// tb_full_size_ram: the top level at its default sizes (800 x 600 image,
// RAM line buffers instead of registers, fully unrolled adder). One full frame of the test
// image streams in, one pixel per clock with occasional idle cycles, and
// every one of the 798 x 598 results is checked against the reference model,
// including its 7-cycle latency; the example circuits each run one operation.
module tb_full_size_ram;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 800, H = 600, LAT = 7, THR = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  rgb_t in_rgb = '0;
  mag_t threshold = mag_t'(THR);
  logic out_valid, out_sof, out_eol, out_edge;
  mag_t out_mag;
  logic acc_start = 1'b0;
  logic [3:0][15:0] acc_data = '0;
  logic acc_busy, acc_done;
  logic [17:0] acc_sum;
  logic gcd_start = 1'b0;
  logic [15:0] gcd_a = '0, gcd_b = '0;
  logic gcd_busy, gcd_done;
  logic [15:0] gcd_result;
  int checks = 0, failures = 0, n_out = 0, n_edge = 0;
  longint cycle = 0;

  mbd_cdfg_top #(.USE_RAM(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  result_t exp_q[$];
  longint  due_q[$];

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    result_t e;
    longint due;
    checks++;
    n_out++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected result");
    end else begin
      e = exp_q.pop_front();
      due = due_q.pop_front();
      if (e.is_edge) n_edge++;
      if (int'(out_mag) != e.mag || out_edge !== e.is_edge || out_sof !== e.sof ||
          out_eol !== e.eol || cycle != due) begin
        failures++;
        if (failures < 10)
          $display("mismatch mag=%0d/%0d edge=%b/%b cycle=%0d due=%0d",
                   out_mag, e.mag, out_edge, e.is_edge, cycle, due);
      end
    end
  end

  initial begin
    rgb_t img[];
    make_image(img, W, H, 0);
    expected(img, W, H, THR, exp_q);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // example circuits: one operation each
    @(negedge clk);
    acc_data = {16'd40000, 16'd30000, 16'd20000, 16'd10000};
    acc_start = 1'b1;
    gcd_a = 16'd1071; gcd_b = 16'd462;
    gcd_start = 1'b1;
    @(negedge clk);
    acc_start = 1'b0; gcd_start = 1'b0;
    checks++;
    if (!acc_done || acc_sum != 18'd100000) failures++;
    wait (gcd_done);
    checks++;
    if (gcd_result != 16'd21) failures++;
    // one frame
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        if ($urandom_range(0, 63) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_sof   = (x == 0 && y == 0);
        in_rgb   = img[y * W + x];
        if (x >= 2 && y >= 2) due_q.push_back(cycle + longint'(LAT));
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != (W-2)*(H-2) || n_edge == 0) begin
      failures++;
      $display("results=%0d missing=%0d edges=%0d", n_out, exp_q.size(), n_edge);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
