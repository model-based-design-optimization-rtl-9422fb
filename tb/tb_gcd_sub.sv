// tb_gcd_sub: runs the subtraction loop on random and corner operand pairs
// and checks the result against gcd(a, b) computed here with the modulo form
// of Euclid's algorithm, and the cycle count against the number of
// subtractions the loop needs (one per cycle, plus one cycle to finish).
module tb_gcd_sub;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic busy, done;
  logic [15:0] result;
  int checks = 0, failures = 0;

  gcd_sub #(.DW(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic int gcd_ref(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  // Number of subtractions of the loop, counted without subtracting one by one.
  function automatic int steps_ref(int x, int y);
    int n = 0;
    if (x == 0 || y == 0) return 0;
    while (x != y) begin
      if (x > y) begin int k = (x - 1) / y; n += k; x -= k * y; end
      else       begin int k = (y - 1) / x; n += k; y -= k * x; end
    end
    return n;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, exp_r, exp_n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      case (t)
        0: begin a = 48; b = 18; end
        1: begin a = 7;  b = 7;  end
        2: begin a = 0;  b = 9;  end
        3: begin a = 1;  b = 1000; end
        default: begin
          a = 16'($urandom_range(1, 2000));
          b = 16'($urandom_range(1, 2000));
        end
      endcase
      exp_r = (a == 0) ? int'(b) : (b == 0) ? int'(a) : gcd_ref(int'(a), int'(b));
      exp_n = steps_ref(int'(a), int'(b));
      start = 1'b1;
      cyc = 0;
      @(posedge clk); #1;
      start = 1'b0;
      a = '0; b = '0;
      while (!done && cyc < 5000) begin
        @(posedge clk); #1;
        cyc++;
      end
      checks++;
      if (!done || int'(result) != exp_r || cyc != exp_n + 1) begin
        failures++;
        $display("mismatch result=%0d exp=%0d cycles=%0d exp=%0d", result, exp_r, cyc, exp_n + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
