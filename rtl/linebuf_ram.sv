// linebuf_ram: RAM-based line buffering (Implementation II of the reference
// design, which trades speed for far fewer registers by holding the lines in
// block RAM).
// Two line memories of WIDTH pixels are addressed by the column counter. At
// each valid pixel both memories are read at the current column and written
// in a read-before-write cascade: line 1 receives the incoming pixel, line 0
// receives what line 1 held, so line 1 always has the previous row and line 0
// the row before it. The reference counts four RAMs for this version but does
// not say how they are organised; two line RAMs are this design's choice.
// Interface and timing are identical to linebuf_reg: out_col[2] is the
// incoming pixel, [1] one row up, [0] two rows up, registered one cycle after
// the input. in_sof resets the column counter to zero.
module linebuf_ram
  import edge_pkg::*;
#(
  parameter int WIDTH = 800
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sof,
  input  pix_t in_pix,
  output logic out_valid,
  output logic out_sof,
  output col_t out_col
);
  localparam int AW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  pix_t ram0 [WIDTH];   // row y-2
  pix_t ram1 [WIDTH];   // row y-1
  logic [AW-1:0] col_q, addr;

  always_comb addr = in_sof ? '0 : col_q;

  // Column counter: wraps at WIDTH, restarts at a frame start.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) col_q <= '0;
    else if (in_valid) col_q <= (addr == AW'(WIDTH-1)) ? '0 : addr + 1'b1;
  end

  // Memories: synchronous read-before-write, one read and one write port each.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      ram1[addr] <= in_pix;
      ram0[addr] <= ram1[addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_col   <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      if (in_valid) out_col <= {in_pix, ram1[addr], ram0[addr]};
    end
  end
endmodule
