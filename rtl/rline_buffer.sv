// rline_buffer: access to R vertically aligned values of a raster stream.
//
// R-1 line memories (line_bram) are chained: memory k stores the output of
// memory k-1 (memory 1 stores the input), always at address x_cnt, and is
// read at x_cnt+2. Because each memory answers two ticks after it is
// addressed, its output in the tick with x_cnt = x is the word stored at x
// one line earlier. d_out[0] is the input itself and d_out[k] is the value
// of the same column k lines above, all in the same tick. LINE_LEN must be
// the number of ticks per line (x_cnt counts 0..LINE_LEN-1 and every tick is
// stored, blanking included); the read address wraps at LINE_LEN.
//
// The chain, the x_cnt write address and the x_cnt+2 read address are those
// of the source design. Default R = 30 rows: 28 for the 27x27 filter plus
// one row above and one below for the response triplets.
module rline_buffer
  import surf_pkg::*;
#(
  parameter int unsigned R        = RLINES,
  parameter int unsigned DW       = II_W,
  parameter int unsigned LINE_LEN = DEF_H_TOTAL
) (
  input  logic          pixel_clk,
  input  logic [DW-1:0] d_in,
  input  logic [XW-1:0] x_cnt,
  output logic [DW-1:0] d_out [R]
);

  localparam int unsigned AW = (LINE_LEN > 1) ? $clog2(LINE_LEN) : 1;

  logic [AW-1:0] wr_addr;
  logic [AW-1:0] rd_addr;

  assign wr_addr = AW'(x_cnt);
  always_comb begin
    if (32'(x_cnt) + 2 >= LINE_LEN) rd_addr = AW'(32'(x_cnt) + 2 - LINE_LEN);
    else                            rd_addr = AW'(32'(x_cnt) + 2);
  end

  assign d_out[0] = d_in;

  for (genvar k = 1; k < R; k++) begin : g_line
    line_bram #(.DW(DW), .DEPTH(LINE_LEN)) u_bram (
      .clk       (pixel_clk),
      .data_in   (d_out[k-1]),
      .write_addr(wr_addr),
      .read_addr (rd_addr),
      .data_out  (d_out[k])
    );
  end

endmodule
