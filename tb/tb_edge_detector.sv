// tb_edge_detector: runs small frames through both buffer variants of the
// edge detector (registers and RAM) side by side, with random idle cycles
// between pixels and frames of different content back to back, and checks
// every result (magnitude, edge bit, sof/eol flags) against the reference
// model, the number of results per frame, and the 7-cycle latency from the
// pixel that completes a window to its result.
module tb_edge_detector;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 11, H = 7, LAT = 7, THR = 150;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  rgb_t in_rgb = '0;
  mag_t threshold = mag_t'(THR);
  logic [1:0] out_valid, out_sof, out_eol, out_edge;
  mag_t [1:0] out_mag;
  int checks = 0, failures = 0;
  int n_edge = 0, n_flat = 0, n_gap = 0;
  longint cycle = 0;

  for (genvar v = 0; v < 2; v++) begin : g_dut
    edge_detector #(.WIDTH(W), .HEIGHT(H), .USE_RAM(v == 1)) dut (
      .clk, .rst_n, .in_valid, .in_sof, .in_rgb, .threshold,
      .out_valid(out_valid[v]), .out_sof(out_sof[v]), .out_eol(out_eol[v]),
      .out_edge(out_edge[v]), .out_mag(out_mag[v]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  result_t exp_q [2][$];
  longint  due_q [2][$];   // cycle at which each result is due

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor, one per variant.
  always @(negedge clk) if (rst_n) begin
    for (int v = 0; v < 2; v++)
      if (out_valid[v]) begin
        result_t e;
        longint due;
        checks++;
        if (exp_q[v].size() == 0) begin
          failures++;
          $display("unexpected result variant %0d", v);
        end else begin
          e = exp_q[v].pop_front();
          due = due_q[v].pop_front();
          if (int'(out_mag[v]) != e.mag || out_edge[v] !== e.is_edge ||
              out_sof[v] !== e.sof || out_eol[v] !== e.eol || cycle != due) begin
            failures++;
            $display("mismatch v=%0d mag=%0d/%0d edge=%b/%b cycle=%0d due=%0d",
                     v, out_mag[v], e.mag, out_edge[v], e.is_edge, cycle, due);
          end
          if (v == 0) begin
            if (e.is_edge) n_edge++; else n_flat++;
          end
        end
      end
  end

  initial begin
    rgb_t img[];
    result_t q[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      make_image(img, W, H, f % 2);
      q.delete();
      expected(img, W, H, THR, q);
      for (int v = 0; v < 2; v++) foreach (q[i]) exp_q[v].push_back(q[i]);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            n_gap++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sof   = (x == 0 && y == 0);
          in_rgb   = img[y * W + x];
          // this pixel completes the window centred on (x-1, y-1)
          if (x >= 2 && y >= 2)
            for (int v = 0; v < 2; v++) due_q[v].push_back(cycle + longint'(LAT));
        end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (LAT + 3) @(negedge clk);
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (exp_q[v].size() != 0) begin
        failures++;
        $display("variant %0d: %0d results missing", v, exp_q[v].size());
      end
    end
    checks++;
    if (n_edge == 0 || n_flat == 0 || n_gap == 0) begin
      failures++;
      $display("coverage: edge=%0d flat=%0d gaps=%0d", n_edge, n_flat, n_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
