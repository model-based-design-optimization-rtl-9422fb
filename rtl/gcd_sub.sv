// gcd_sub: the feedback-loop example. The loop
//   while (a != b) { if (a > b) a -= b; else b -= a; }
// cannot be pipelined: each comparison needs the result of the previous
// iteration's subtraction, so the datapath is a single compare/subtract step
// that feeds its own registers, one iteration per clock. The result is
// gcd(a, b). Which of the two operands is reduced in each branch follows the
// example's "a != b" and "b -= a"; the rest of the loop is this design's
// reading, as is the handling of zero (an operand of 0 ends the loop at once,
// the result is the other operand, since the loop would not terminate).
// The two branches of the if-else never run in the same iteration, so they
// share one subtractor: a multiplexer puts the larger operand on its left
// input and the smaller on its right (resource sharing among the branches of
// an if-else).
// Interface: pulse start with a and b; busy is high while iterating; done
// pulses for one cycle with result valid. Timing: one cycle per subtraction
// plus one to finish. A start while busy is ignored.
module gcd_sub #(
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] result
);
  logic [DW-1:0] a_q, b_q;
  logic          a_gt;
  logic [DW-1:0] greater, lesser, diff;

  // Shared subtractor for "a -= b" and "b -= a".
  always_comb begin
    a_gt  = a_q > b_q;
    greater   = a_gt ? a_q : b_q;
    lesser = a_gt ? b_q : a_q;
    diff  = greater - lesser;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q  <= a;
          b_q  <= b;
          busy <= 1'b1;
        end
      end else if (a_q == b_q || a_q == '0 || b_q == '0) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        result <= (a_q == '0) ? b_q : a_q;
      end else if (a_gt) begin
        a_q <= diff;
      end else begin
        b_q <= diff;
      end
    end
  end
endmodule
