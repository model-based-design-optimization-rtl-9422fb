// mbd_cdfg_top: top level. It holds the streaming edge detector, the main
// design, and beside it the two small example circuits that illustrate the
// optimisation rules the edge detector was built by: loop unrolling
// (unroll_accum, ADDERS adders trade area for latency) and a feedback loop
// that cannot be pipelined (gcd_sub). The three do not exchange data; each
// has its own ports, prefixed acc_ and gcd_ for the examples.
// Parameters: WIDTH/HEIGHT size the image, USE_RAM selects RAM line buffers
// instead of register line buffers, ADDERS the unrolling of the example.
// Timing of each part is described in its own module.
module mbd_cdfg_top
  import edge_pkg::*;
#(
  parameter int WIDTH   = 800,
  parameter int HEIGHT  = 600,
  parameter bit USE_RAM = 1'b0,
  parameter int ADDERS  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // edge detector
  input  logic              in_valid,
  input  logic              in_sof,
  input  rgb_t              in_rgb,
  input  mag_t              threshold,
  output logic              out_valid,
  output logic              out_sof,
  output logic              out_eol,
  output logic              out_edge,
  output mag_t              out_mag,
  // loop-unrolling example
  input  logic              acc_start,
  input  logic [3:0][15:0]  acc_data,
  output logic              acc_busy,
  output logic              acc_done,
  output logic [17:0]       acc_sum,
  // feedback-loop example
  input  logic              gcd_start,
  input  logic [15:0]       gcd_a,
  input  logic [15:0]       gcd_b,
  output logic              gcd_busy,
  output logic              gcd_done,
  output logic [15:0]       gcd_result
);
  edge_detector #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .USE_RAM(USE_RAM)) u_edge (
    .clk, .rst_n, .in_valid, .in_sof, .in_rgb, .threshold,
    .out_valid, .out_sof, .out_eol, .out_edge, .out_mag
  );

  unroll_accum #(.N(4), .ADDERS(ADDERS), .DW(16)) u_acc (
    .clk, .rst_n, .start(acc_start), .data(acc_data),
    .busy(acc_busy), .done(acc_done), .sum(acc_sum)
  );

  gcd_sub #(.DW(16)) u_gcd (
    .clk, .rst_n, .start(gcd_start), .a(gcd_a), .b(gcd_b),
    .busy(gcd_busy), .done(gcd_done), .result(gcd_result)
  );
endmodule
