// unroll_accum: the loop-unrolling example. A loop adds N values into one
// accumulator register. With ADDERS adders working in parallel, ADDERS loop
// iterations are done per cycle, so the sum takes N / ADDERS cycles:
// 1 adder -> 4 cycles, 2 adders -> 2 cycles, 4 adders (fully unrolled) ->
// 1 cycle for N = 4. More adders buy a shorter latency; this is the
// speed/area trade-off the three options illustrate. The loop body
// (acc += data[i], acc cleared at start) and the data width are this design's
// reading of the example.
// Interface: pulse start with data valid for that cycle (operands are
// captured). done pulses for one cycle with sum valid, N / ADDERS cycles
// after start. A start while busy is ignored.
module unroll_accum #(
  parameter int N      = 4,
  parameter int ADDERS = 4,     // 1, 2 or 4 for N = 4; must divide N
  parameter int DW     = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [N-1:0][DW-1:0]          data,
  output logic                          busy,
  output logic                          done,
  output logic [DW+$clog2(N)-1:0]       sum
);
  localparam int SW    = DW + $clog2(N);
  localparam int STEPS = N / ADDERS;
  localparam int CW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  logic [N-1:0][DW-1:0] op_q;
  logic [SW-1:0]        acc_q, acc_d, acc_base;
  logic [CW-1:0]        step_q, step;
  logic                 first;

  // Operands of this cycle: from the input on the start cycle, else captured.
  always_comb begin
    first    = start && !busy;
    step     = first ? '0 : step_q;
    acc_base = first ? '0 : acc_q;
    acc_d    = acc_base;
    for (int k = 0; k < ADDERS; k++)
      acc_d = acc_d + SW'(first ? data[int'(step)*ADDERS + k]
                                : op_q[int'(step)*ADDERS + k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q   <= '0;
      acc_q  <= '0;
      step_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      sum    <= '0;
    end else begin
      done <= 1'b0;
      if (first) op_q <= data;
      if (first || busy) begin
        acc_q <= acc_d;
        if (int'(step) == STEPS-1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          sum    <= acc_d;
          step_q <= '0;
        end else begin
          busy   <= 1'b1;
          step_q <= step + 1'b1;
        end
      end
    end
  end

  initial assert (N % ADDERS == 0) else $error("ADDERS must divide N");
endmodule
