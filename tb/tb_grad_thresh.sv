// tb_grad_thresh: applies random and extreme Gx/Gy pairs and thresholds and
// checks, two cycles later, the magnitude |Gx| + |Gy| and the edge decision
// (magnitude above threshold) computed here; also checks both decisions occur.
module tb_grad_thresh;
  import edge_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sof = 1'b0, in_eol = 1'b0;
  grad_t in_gx = '0, in_gy = '0;
  mag_t threshold = '0;
  logic out_valid, out_sof, out_eol, out_edge;
  mag_t out_mag;
  int checks = 0, failures = 0, n_edge = 0, n_flat = 0;

  grad_thresh dut (.*);

  always #5 clk = ~clk;

  int q_mag[$], q_thr[$];
  logic q_v[$], q_sof[$], q_eol[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    int m;
    m = (in_gx < 0 ? -int'(in_gx) : int'(in_gx)) + (in_gy < 0 ? -int'(in_gy) : int'(in_gy));
    q_mag.push_back(m);
    q_thr.push_back(int'(threshold));
    q_v.push_back(in_valid); q_sof.push_back(in_valid & in_sof); q_eol.push_back(in_valid & in_eol);
    if (q_v.size() > 2) begin
      int em;
      logic ee, ev, es, el;
      em = q_mag.pop_front(); ee = (em > q_thr[1]); void'(q_thr.pop_front());
      ev = q_v.pop_front(); es = q_sof.pop_front(); el = q_eol.pop_front();
      checks++;
      if (out_valid !== ev || out_sof !== es || out_eol !== el ||
          (ev && (int'(out_mag) != em || out_edge !== ee))) begin
        failures++;
        $display("mismatch mag=%0d/%0d edge=%b/%b", out_mag, em, out_edge, ee);
      end
      if (ev && ee) n_edge++;
      if (ev && !ee) n_flat++;
    end
  end

  // The threshold is compared in stage 2, so the reference uses the
  // threshold seen one cycle after the sample entered.
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(0, 4) != 0);
      in_sof = ($urandom_range(0, 9) == 0);
      in_eol = ($urandom_range(0, 9) == 0);
      in_gx = grad_t'($urandom_range(0, 2040)) - grad_t'(1020);
      in_gy = grad_t'($urandom_range(0, 2040)) - grad_t'(1020);
      if (i % 10 == 0) begin in_gx = -1020; in_gy = 1020; end
      if (i % 10 == 1) begin in_gx = 0; in_gy = 0; end
    end
    @(posedge clk); #1 in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Threshold changes every 50 cycles.
  initial begin
    forever begin
      repeat (50) @(posedge clk);
      #2 threshold = mag_t'($urandom_range(0, 2040));
    end
  end
endmodule
