// preprocessor: streaming integral image.
//
// For every pixel p(x,y) of the raster it outputs
//   II(x,y) = p(x,y) + rowsum(x-1,y) + II(x,y-1)
// where rowsum is a horizontal accumulator of the pixels of the current line
// (cleared by h_sync) and II(x,y-1) comes from a one-line delay memory that
// holds the integral values of the previous line. On the first line of a
// frame (y_cnt == 0) the previous-line value is taken as zero. Values are
// kept modulo 2^II_W; box sums formed from them stay exact as long as the
// true sum fits in II_W bits.
//
// Interface and timing: the input stream is pixel_data plus the sync_t
// sideband; ii and sync_out follow one tick later. The line memory has
// LINE_LEN = H_TOTAL entries addressed by x_cnt; it is read one tick ahead
// (address x_cnt+1) through a read register, so it maps to one block RAM.
//
// The accumulator, the one-line buffer and the three-term sum follow the
// source design; the zero above the first line and the read-ahead
// addressing are this design's choices.
module preprocessor
  import surf_pkg::*;
#(
  parameter int unsigned LINE_LEN = DEF_H_TOTAL
) (
  input  logic             pixel_clk,
  input  logic             rst,
  input  logic [PIX_W-1:0] pixel_data,
  input  sync_t            sync_in,
  output logic [II_W-1:0]  ii,
  output sync_t            sync_out
);

  localparam int unsigned AW = (LINE_LEN > 1) ? $clog2(LINE_LEN) : 1;

  logic [II_W-1:0] line_mem [LINE_LEN];
  logic [II_W-1:0] above_q;   // II(x, y-1), read one tick ahead
  logic [II_W-1:0] rowsum;    // sum of the pixels left of x in this line
  logic [II_W-1:0] rowsum_eff;
  logic [II_W-1:0] above_eff;
  logic [II_W-1:0] ii_next;
  logic [AW-1:0]   rd_addr;
  logic [AW-1:0]   wr_addr;

  assign wr_addr = AW'(sync_in.x);
  assign rd_addr = (32'(sync_in.x) >= LINE_LEN - 1) ? '0 : AW'(sync_in.x) + 1'b1;

  always_comb begin
    rowsum_eff = sync_in.hs ? '0 : rowsum;
    above_eff  = (sync_in.y == '0) ? '0 : above_q;
    ii_next    = II_W'(pixel_data) + rowsum_eff + above_eff;
  end

  always_ff @(posedge pixel_clk) begin
    line_mem[wr_addr] <= ii_next;
    above_q           <= line_mem[rd_addr];
  end

  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      rowsum   <= '0;
      ii       <= '0;
      sync_out <= '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
    end else begin
      rowsum   <= rowsum_eff + II_W'(pixel_data);
      ii       <= ii_next;
      sync_out <= sync_in;
    end
  end

endmodule
