// response_calc: separable box-filter convolution and Hessian response for
// one filter size and one row of the response triplet.
//
// The SURF box filters of size S are sampled on a (S+1)x(S+1) grid of
// integral image values W(col,row). The samples fall on four column
// offsets and four row offsets o0..o9 (the 9x9 pattern coordinates
// 0..9 scaled by S/9 and rounded), so each filter splits into a vertical
// part, evaluated on the column that is entering the window,
//   s1 = W(o2) - W(o7)
//   s2 = W(o0) - 3 W(o3) + 3 W(o6) - W(o9)
//   s3 = W(o1) - W(o4) - W(o5) + W(o8)
// and a horizontal part over the buffered s-values of earlier columns,
//   Dxx = s1(o0) - 3 s1(o3) + 3 s1(o6) - s1(o9)
//   Dyy = s2(o2) - s2(o7)
//   Dxy = s3(o1) - s3(o4) - s3(o5) + s3(o8).
// Only three shift registers of S+1 entries are needed however large the
// filter. The integral values wrap modulo 2^II_W; the differences are
// exact and are cut to D_W signed bits. The hessian module then forms the
// score, which is multiplied by round(2^16 * 9^4 / S^4) and shifted right
// by 16 so that all filter sizes are compared on the scale of the 9x9
// filter, and finally delayed by col_align(S) ticks so that every size
// reports the same centre column. The normalised score is kept in SC_W = 32
// signed bits: with 8-bit pixels |Dxx|, |Dyy| <= 68,850 and |Dxy| <= 66,300
// at S = 27, and the normalised score of any size stays below 7e7, so the
// cut loses nothing.
//
// Interface: col[] is the r-line buffer output, col[k] being k lines above
// the newest line. ROW0 selects the top row of this window counted from the
// oldest line (col[RLINES-1]). Timing: the score for the window whose
// right-most column entered in tick t appears in tick
// t + RESP_LAT + col_align(S); its centre pixel is (S+1)/2 columns right of
// the window's left edge and (S+1)/2 rows below ROW0.
//
// The partial sums, the shift registers and the stage counts (one for the
// s-values, one for the responses) follow the source design. Its printed
// sum for Dxx ends in "+ s1(9)"; the full Dxx formula and the box
// arithmetic need "- s1(9)", which is used here. The scale normalisation
// and the rounding of the offsets are this design's choices.
module response_calc
  import surf_pkg::*;
#(
  parameter int unsigned S    = 9,
  parameter int unsigned ROW0 = (SMAX + 1) / 2 + 1 - (S + 1) / 2
) (
  input  logic                 clk,
  input  logic [II_W-1:0]      col [RLINES],
  output logic signed [SC_W-1:0] score
);

  localparam int unsigned O0 = pat_off(0, S);
  localparam int unsigned O1 = pat_off(1, S);
  localparam int unsigned O2 = pat_off(2, S);
  localparam int unsigned O3 = pat_off(3, S);
  localparam int unsigned O4 = pat_off(4, S);
  localparam int unsigned O5 = pat_off(5, S);
  localparam int unsigned O6 = pat_off(6, S);
  localparam int unsigned O7 = pat_off(7, S);
  localparam int unsigned O8 = pat_off(8, S);
  localparam int unsigned O9 = pat_off(9, S);
  localparam longint unsigned K = norm_k(S);
  localparam int unsigned KW = NORM_SH + 2;
  localparam int unsigned ALIGN = col_align(S);

  // window row j of this filter -> r-line buffer output index
  function automatic int unsigned ri(input int unsigned j);
    return RLINES - 1 - (ROW0 + j);
  endfunction

  logic [II_W-1:0] sr1 [S+1];
  logic [II_W-1:0] sr2 [S+1];
  logic [II_W-1:0] sr3 [S+1];
  logic [II_W-1:0] dxx_w, dyy_w, dxy_w;
  logic signed [D_W-1:0] dxx_q, dyy_q, dxy_q;
  logic signed [H_W-1:0] hs;
  logic signed [H_W+KW-1:0] hk;
  logic signed [SC_W-1:0] norm_q;

  // s_calc: vertical partial sums of the entering column go into entry 0
  // of the shift registers; srN[k] is the s-value of the column k ticks
  // before the one in srN[0]
  always_ff @(posedge clk) begin
    sr1[0] <= col[ri(O2)] - col[ri(O7)];
    sr2[0] <= col[ri(O0)] - 3 * col[ri(O3)] + 3 * col[ri(O6)] - col[ri(O9)];
    sr3[0] <= col[ri(O1)] - col[ri(O4)] - col[ri(O5)] + col[ri(O8)];
    for (int k = 1; k <= S; k++) begin
      sr1[k] <= sr1[k-1];
      sr2[k] <= sr2[k-1];
      sr3[k] <= sr3[k-1];
    end
  end

  // d_calc: horizontal combination; window column j sits at sr[S-j]
  always_comb begin
    dxx_w = sr1[S-O0] - 3 * sr1[S-O3] + 3 * sr1[S-O6] - sr1[S-O9];
    dyy_w = sr2[S-O2] - sr2[S-O7];
    dxy_w = sr3[S-O1] - sr3[S-O4] - sr3[S-O5] + sr3[S-O8];
  end
  always_ff @(posedge clk) begin
    dxx_q <= D_W'(dxx_w);
    dyy_q <= D_W'(dyy_w);
    dxy_q <= D_W'(dxy_w);
  end

  hessian #(.DW(D_W), .HW(H_W)) u_hessian (
    .clk          (clk),
    .dxx          (dxx_q),
    .dyy          (dyy_q),
    .dxy          (dxy_q),
    .feature_score(hs)
  );

  // scale normalisation
  assign hk = (H_W+KW)'(hs) * $signed({1'b0, (KW-1)'(K)});
  always_ff @(posedge clk) norm_q <= SC_W'(hk >>> NORM_SH);

  // centre-column alignment across filter sizes
  if (ALIGN == 0) begin : g_noalign
    assign score = norm_q;
  end else begin : g_align
    logic signed [SC_W-1:0] dly [ALIGN];
    always_ff @(posedge clk) begin
      dly[0] <= norm_q;
      for (int k = 1; k < ALIGN; k++) dly[k] <= dly[k-1];
    end
    assign score = dly[ALIGN-1];
  end

endmodule
