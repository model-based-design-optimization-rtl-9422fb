// tb_mbd_cdfg_top: end-to-end test of the top level. Two instances run side
// by side: one with register line buffers and the fully unrolled adder
// (ADDERS = 4), one with RAM line buffers and a single adder (ADDERS = 1).
// Frames of two kinds run back to back with random idle cycles while the
// example circuits are exercised at the same time. Every edge result is
// checked against the reference model, including its latency; sums and
// loop results against values computed here. Each mechanism of the design
// is counted and must occur: idle input cycles, frame restarts, dropped
// border pixels, edge and non-edge decisions, both buffer styles, both
// unrolling latencies, multi-step feedback loops and the zero-operand exit.
module tb_mbd_cdfg_top;
  import edge_pkg::*;
  import edge_ref_pkg::*;
  localparam int W = 12, H = 8, LAT = 7, THR = 120, FRAMES = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0;
  rgb_t in_rgb = '0;
  mag_t threshold = mag_t'(THR);
  logic [1:0] out_valid, out_sof, out_eol, out_edge;
  mag_t [1:0] out_mag;
  logic acc_start = 1'b0;
  logic [3:0][15:0] acc_data = '0;
  logic [1:0] acc_busy, acc_done;
  logic [1:0][17:0] acc_sum;
  logic gcd_start = 1'b0;
  logic [15:0] gcd_a = '0, gcd_b = '0;
  logic [1:0] gcd_busy, gcd_done;
  logic [1:0][15:0] gcd_result;
  int checks = 0, failures = 0;
  longint cycle = 0;
  bit edge_done = 1'b0, ex_done = 1'b0;

  // mechanism counters
  int n_gap = 0, n_restart = 0, n_border = 0, n_edge = 0, n_flat = 0;
  int n_regbuf = 0, n_rambuf = 0, n_acc1 = 0, n_acc4 = 0, n_loop = 0, n_zero = 0;

  localparam int ADD [2] = '{4, 1};
  for (genvar v = 0; v < 2; v++) begin : g_top
    mbd_cdfg_top #(.WIDTH(W), .HEIGHT(H), .USE_RAM(v == 1), .ADDERS(ADD[v])) dut (
      .clk, .rst_n, .in_valid, .in_sof, .in_rgb, .threshold,
      .out_valid(out_valid[v]), .out_sof(out_sof[v]), .out_eol(out_eol[v]),
      .out_edge(out_edge[v]), .out_mag(out_mag[v]),
      .acc_start, .acc_data, .acc_busy(acc_busy[v]), .acc_done(acc_done[v]), .acc_sum(acc_sum[v]),
      .gcd_start, .gcd_a, .gcd_b, .gcd_busy(gcd_busy[v]), .gcd_done(gcd_done[v]),
      .gcd_result(gcd_result[v]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  result_t exp_q [2][$];
  longint  due_q [2][$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
            n_regbuf++;
            if (e.is_edge) n_edge++; else n_flat++;
          end else begin
            n_rambuf++;
          end
        end
      end
  end

  // Edge-detector stimulus.
  initial begin
    rgb_t img[];
    result_t q[$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      if (f > 0) n_restart++;
      make_image(img, W, H, f % 2);
      q.delete();
      expected(img, W, H, THR, q);
      for (int v = 0; v < 2; v++) foreach (q[i]) exp_q[v].push_back(q[i]);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 4) == 0) begin
            in_valid = 1'b0;
            n_gap++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_sof   = (x == 0 && y == 0);
          in_rgb   = img[y * W + x];
          if (x >= 2 && y >= 2)
            for (int v = 0; v < 2; v++) due_q[v].push_back(cycle + longint'(LAT));
          else
            n_border++;
        end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (LAT + 3) @(negedge clk);
    edge_done = 1'b1;
  end

  // Example circuits, running at the same time.
  initial begin
    int exp, g, ga, gb, gr, steps_seen;
    int lat [2];
    bit seen [2];
    @(posedge rst_n);
    for (int t = 0; t < 40; t++) begin
      // loop unrolling: sum of four operands
      @(negedge clk);
      exp = 0;
      for (int k = 0; k < 4; k++) begin
        acc_data[k] = 16'($urandom);
        exp += int'(acc_data[k]);
      end
      acc_start = 1'b1;
      seen = '{0, 0};
      for (int c = 1; c <= 6; c++) begin
        @(posedge clk); #1;
        acc_start = 1'b0;
        for (int v = 0; v < 2; v++)
          if (acc_done[v] && !seen[v]) begin
            seen[v] = 1'b1;
            lat[v] = c;
          end
      end
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (!seen[v] || int'(acc_sum[v]) != exp || lat[v] != 4 / ADD[v]) begin
          failures++;
          $display("accumulate v=%0d sum=%0d exp=%0d latency=%0d", v, acc_sum[v], exp, lat[v]);
        end else if (ADD[v] == 1) n_acc1++;
        else n_acc4++;
      end
      // feedback loop: gcd by subtraction
      @(negedge clk);
      gcd_a = (t % 8 == 7) ? 16'd0 : 16'($urandom_range(1, 300));
      gcd_b = 16'($urandom_range(1, 300));
      ga = int'(gcd_a);
      gb = int'(gcd_b);
      while (gb != 0) begin gr = ga % gb; ga = gb; gb = gr; end
      g = ga;
      gcd_start = 1'b1;
      steps_seen = 0;
      @(posedge clk); #1;
      gcd_start = 1'b0;
      while (!gcd_done[0] && steps_seen < 1000) begin
        @(posedge clk); #1;
        steps_seen++;
      end
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (!gcd_done[v] || int'(gcd_result[v]) != g) begin
          failures++;
          $display("gcd v=%0d result=%0d exp=%0d", v, gcd_result[v], g);
        end
      end
      if (gcd_a == 0) n_zero++;
      else if (steps_seen > 1) n_loop++;
    end
    ex_done = 1'b1;
  end

  initial begin
    wait (edge_done && ex_done);
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (exp_q[v].size() != 0) begin
        failures++;
        $display("variant %0d: %0d results missing", v, exp_q[v].size());
      end
    end
    $display("mechanisms: gaps=%0d restarts=%0d border=%0d edge=%0d flat=%0d regbuf=%0d rambuf=%0d acc1=%0d acc4=%0d loop=%0d zero=%0d",
             n_gap, n_restart, n_border, n_edge, n_flat, n_regbuf, n_rambuf, n_acc1, n_acc4, n_loop, n_zero);
    checks++; if (n_gap == 0)     begin failures++; $display("never: idle input cycle"); end
    checks++; if (n_restart == 0) begin failures++; $display("never: frame restart"); end
    checks++; if (n_border == 0)  begin failures++; $display("never: border pixel dropped"); end
    checks++; if (n_edge == 0)    begin failures++; $display("never: edge"); end
    checks++; if (n_flat == 0)    begin failures++; $display("never: non-edge"); end
    checks++; if (n_regbuf == 0)  begin failures++; $display("never: register buffering"); end
    checks++; if (n_rambuf == 0)  begin failures++; $display("never: RAM buffering"); end
    checks++; if (n_acc1 == 0)    begin failures++; $display("never: 4-cycle accumulate"); end
    checks++; if (n_acc4 == 0)    begin failures++; $display("never: 1-cycle accumulate"); end
    checks++; if (n_loop == 0)    begin failures++; $display("never: multi-step loop"); end
    checks++; if (n_zero == 0)    begin failures++; $display("never: zero operand"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
