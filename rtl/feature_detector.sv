// feature_detector: separable-convolution SURF detector core.
//
// The integral image stream enters an r-line buffer of RLINES rows, which
// presents one full column of integral values per tick. For each of the
// NSCALE filter sizes (9, 15, 21, 27) three response_calc units evaluate
// the Hessian score on that column for three vertically adjacent centre
// rows; all twelve share the buffered lines, so the response triplets cost
// only two extra line memories. The response triplets go to the NMS, which
// reports a maximum for the inner filter sizes (15 and 21).
//
// Interface and timing: ii and sync_in come from the preprocessor. The
// feature_data bit i in a tick refers to the pixel DELTA_Y lines and
// DELTA_X pixels before the one carried by sync_in in the same tick
// (raster order, blanking included); sync_out repeats sync_in so that the
// detector interface can subtract these constant latencies. A new pixel is
// accepted every tick. The structure follows the source design; the
// threshold port is this design's addition.
module feature_detector
  import surf_pkg::*;
#(
  parameter int unsigned LINE_LEN = DEF_H_TOTAL
) (
  input  logic                  pixel_clk,
  input  logic                  rst,
  input  logic [II_W-1:0]       ii,
  input  sync_t                 sync_in,
  input  logic signed [SC_W-1:0] threshold,
  output logic [NDET-1:0]       feature_data,
  output sync_t                 sync_out
);

  logic [II_W-1:0]       col [RLINES];
  logic signed [SC_W-1:0] scores [NSCALE][3];

  rline_buffer #(.R(RLINES), .DW(II_W), .LINE_LEN(LINE_LEN)) u_rline (
    .pixel_clk(pixel_clk),
    .d_in     (ii),
    .x_cnt    (sync_in.x),
    .d_out    (col)
  );

  for (genvar sc = 0; sc < NSCALE; sc++) begin : g_scale
    for (genvar t = 0; t < 3; t++) begin : g_row
      localparam int unsigned S = filter_size(sc);
      response_calc #(
        .S   (S),
        .ROW0(t + (SMAX + 1) / 2 - (S + 1) / 2)
      ) u_resp (
        .clk  (pixel_clk),
        .col  (col),
        .score(scores[sc][t])
      );
    end
  end

  nms #(.NS(NSCALE)) u_nms (
    .clk      (pixel_clk),
    .rst      (rst),
    .scores   (scores),
    .threshold(threshold),
    .is_max   (feature_data)
  );

  assign sync_out = sync_in;

endmodule
