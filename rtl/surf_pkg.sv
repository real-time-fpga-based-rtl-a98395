// surf_pkg: types, default sizes and constant functions shared by the
// stream-based SURF detection pipeline.
//
// The pipeline carries one pixel per pixel_clk tick together with its raster
// position. Every core between Video sync and Detector interface uses the
// same sideband bundle (blank flag, h_sync, v_sync, x_cnt, y_cnt), defined
// here as sync_t, so that cores can be chained without glue logic.
//
// Defaults follow the 1920x1080 configuration: line memories of 2048 entries
// and 32-bit integral image values, one octave with four intervals (filter
// sizes 9, 15, 21, 27). The raster totals (2048 x 1100) are this design's
// choice: they keep the line length equal to the memory depth and give
// 60 frames/s at about 135 MHz.
package surf_pkg;

  // ---------------- default geometry ----------------
  localparam int unsigned DEF_W       = 1920;  // active pixels per line
  localparam int unsigned DEF_H       = 1080;  // active lines per frame
  localparam int unsigned DEF_H_TOTAL = 2048;  // pixel_clk ticks per line
  localparam int unsigned DEF_V_TOTAL = 1100;  // lines per frame
  localparam int unsigned XW          = 11;    // width of x_cnt
  localparam int unsigned YW          = 11;    // width of y_cnt

  // ---------------- data widths ----------------
  localparam int unsigned PIX_W = 8;   // grey-level pixel
  localparam int unsigned II_W  = 32;  // integral image value (modulo 2^32)
  localparam int unsigned D_W   = 20;  // signed box-filter response
  localparam int unsigned H_W   = 2 * D_W;  // signed Hessian determinant
  localparam int unsigned SC_W  = 32;       // signed normalised feature score

  // ---------------- scale space ----------------
  localparam int unsigned NSCALE = 4;   // intervals of the single octave
  localparam int unsigned NDET   = NSCALE - 2; // intervals that can hold a maximum
  localparam int unsigned SMAX   = 27;  // largest filter size
  // rows of the r-line buffer: largest window (SMAX+1) plus one row above
  // and one below for the vertical response triplets
  localparam int unsigned RLINES = SMAX + 1 + 2;
  // fixed-point scale normalisation: score = (H * NORM_K) >>> NORM_SH
  localparam int unsigned NORM_SH = 16;

  // Filter size of interval i (0-based) of octave 1: 9, 15, 21, 27.
  function automatic int unsigned filter_size(input int unsigned i);
    return 9 + 6 * i;
  endfunction

  // Sampling offset of the 9x9 pattern coordinate k (0..9) scaled to a
  // filter of size s: round(k*s/9). k*s/9 never ends in .5 for s = 3m.
  function automatic int unsigned pat_off(input int unsigned k, input int unsigned s);
    return (2 * k * s + 9) / 18;
  endfunction

  // Normalisation constant round(2^NORM_SH * 9^4 / s^4): brings the Hessian
  // of every filter size to the scale of the 9x9 filter.
  function automatic longint unsigned norm_k(input int unsigned s);
    longint unsigned s4;
    s4 = longint'(s) * s * s * s;
    return ((longint'(6561) << NORM_SH) + s4 / 2) / s4;
  endfunction

  // Extra delay that aligns the centre column of filter size s with the
  // centre column of the largest filter.
  function automatic int unsigned col_align(input int unsigned s);
    return (SMAX - 1) / 2 - (s - 1) / 2;
  endfunction

  // ---------------- pipeline latencies ----------------
  localparam int unsigned S_CALC = 1;  // s-value stage
  localparam int unsigned D_CALC = 1;  // box-filter response stage
  localparam int unsigned H_CALC = 3;  // Hessian stages (Fig. 5)
  localparam int unsigned N_CALC = 1;  // scale normalisation stage
  // Ticks from a column entering the r-line buffer until the aligned scores
  // of the column (SMAX-1)/2 pixels to the left leave the response array.
  localparam int unsigned RESP_LAT = S_CALC + D_CALC + H_CALC + N_CALC;
  // Horizontal and vertical distance between the pixel entering the
  // feature detector and the pixel whose NMS decision leaves it.
  localparam int unsigned DELTA_X = RESP_LAT + (SMAX - 1) / 2 + 1 + 1;
  localparam int unsigned DELTA_Y = (RLINES - 1) / 2;
  // Border where the largest filter of any NMS neighbour leaves the image.
  localparam int unsigned MARGIN = (SMAX + 1) / 2 + 1;

  // ---------------- stream sideband ----------------
  typedef struct packed {
    logic          blank;  // pixel_blank: outside the active image
    logic          hs;     // h_sync: first tick of a line (x_cnt == 0)
    logic          vs;     // v_sync: first tick of a frame (x_cnt == 0, y_cnt == 0)
    logic [XW-1:0] x;      // x_cnt
    logic [YW-1:0] y;      // y_cnt
  } sync_t;

  // Entry of the detector interface FIFO.
  typedef struct packed {
    logic [NDET-1:0] scale;  // bit i: maximum at interval i+2
    logic [YW-1:0]   y;
    logic [XW-1:0]   x;
  } feature_t;

endpackage
