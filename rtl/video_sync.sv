// video_sync: raster timing for the feature detection pipeline.
//
// Turns the camera's pixel data into the stream every later core consumes:
// one pixel per pixel_clk tick, accompanied by pixel_blank, x_cnt, y_cnt,
// h_sync and v_sync. Two free-running counters walk an H_TOTAL x V_TOTAL
// raster; the first W x H positions are the active image, the rest is
// blanking. Blanking pixels are forced to zero so that they add nothing to
// the integral image.
//
// Interface and timing: cam_data is sampled on every rising pixel_clk edge
// and appears on pixel_data one tick later with its coordinates. h_sync is
// high for the single tick with x_cnt == 0, v_sync for the single tick with
// x_cnt == 0 and y_cnt == 0. A pulse on cam_frame_start re-aligns the
// raster: the pixel sampled with it becomes pixel (0,0).
//
// The signal names and the one-pixel-per-tick stream follow the source
// design; the sync pulse positions, zeroed blanking and the re-alignment
// input are this design's choices.
module video_sync
  import surf_pkg::*;
#(
  parameter int unsigned W       = DEF_W,
  parameter int unsigned H       = DEF_H,
  parameter int unsigned H_TOTAL = DEF_H_TOTAL,
  parameter int unsigned V_TOTAL = DEF_V_TOTAL
) (
  input  logic             pixel_clk,
  input  logic             rst,
  input  logic [PIX_W-1:0] cam_data,
  input  logic             cam_frame_start,
  output logic [PIX_W-1:0] pixel_data,
  output sync_t            sync
);

  logic [XW-1:0] xc;
  logic [YW-1:0] yc;
  logic [XW-1:0] xn;
  logic [YW-1:0] yn;
  logic          active;

  // position of the pixel sampled in this tick
  always_comb begin
    if (cam_frame_start) begin
      xn = '0;
      yn = '0;
    end else begin
      xn = xc;
      yn = yc;
    end
    active = (32'(xn) < W) && (32'(yn) < H);
  end

  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      xc         <= '0;
      yc         <= '0;
      pixel_data <= '0;
      sync       <= '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
    end else begin
      pixel_data <= active ? cam_data : '0;
      sync.blank <= !active;
      sync.hs    <= (xn == '0);
      sync.vs    <= (xn == '0) && (yn == '0);
      sync.x     <= xn;
      sync.y     <= yn;
      if (32'(xn) == H_TOTAL - 1) begin
        xc <= '0;
        yc <= (32'(yn) == V_TOTAL - 1) ? '0 : yn + 1'b1;
      end else begin
        xc <= xn + 1'b1;
        yc <= yn;
      end
    end
  end

endmodule
