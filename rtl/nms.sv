// nms: non-maxima suppression in the 3x3x3 scale-space neighbourhood.
//
// Every tick the response array delivers, for each of the NSCALE filter
// sizes, a triplet of scores of one column: the rows above, at and below
// the examined row. Two column registers keep the triplets of the two
// previous columns, so the 3x3 neighbourhood of every size is available at
// once without buffering whole lines of scores. The examined pixel is the
// middle row of the middle (once delayed) column. For every inner interval
// m = 1 .. NSCALE-2 the pixel is a feature when its score exceeds the
// threshold and is strictly greater than all 26 neighbours at sizes m-1, m
// and m+1.
//
// Timing: is_max is registered; it refers to the pixel whose triplet
// entered two ticks earlier. The triplet buffering and the 26-neighbour
// test follow the source design; the threshold input and the strict
// comparison are this design's choices.
module nms
  import surf_pkg::*;
#(
  parameter int unsigned NS = NSCALE
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [SC_W-1:0] scores [NS][3],
  input  logic signed [SC_W-1:0] threshold,
  output logic [NS-3:0]         is_max
);

  // c1: triplets of the previous column (holds the examined pixel),
  // c2: triplets of the column before that
  logic signed [SC_W-1:0] c1 [NS][3];
  logic signed [SC_W-1:0] c2 [NS][3];
  logic [NS-3:0] max_next;

  always_ff @(posedge clk) begin
    c1 <= scores;
    c2 <= c1;
  end

  always_comb begin
    for (int m = 1; m <= NS - 2; m++) begin
      logic signed [SC_W-1:0] v;
      logic ok;
      v  = c1[m][1];
      ok = (v > threshold);
      for (int s = m - 1; s <= m + 1; s++) begin
        for (int r = 0; r < 3; r++) begin
          if (!(s == m && r == 1)) ok = ok && (v > c1[s][r]);
          ok = ok && (v > scores[s][r]) && (v > c2[s][r]);
        end
      end
      max_next[m-1] = ok;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) is_max <= '0;
    else     is_max <= max_next;
  end

endmodule
