// tb_response_calc: presents integral-image columns of a random image, as
// the r-line buffer would, to response_calc units of sizes 9 and 27 and
// compares each score with a Hessian computed from box sums of the raw
// pixels (no integral image, no separable split), at the documented
// latency.
module tb_response_calc;
  import surf_pkg::*;

  localparam int IW = 64, IH = 40;

  logic clk = 1'b0;
  logic [II_W-1:0] col [RLINES];
  logic signed [SC_W-1:0] score9, score27;

  int checks = 0, failures = 0, nonzero = 0;
  int img [IH][IW];
  logic [II_W-1:0] iimg [IH][IW];

  response_calc #(.S(9))  dut9  (.clk(clk), .col(col), .score(score9));
  response_calc #(.S(27)) dut27 (.clk(clk), .col(col), .score(score27));

  always #5 clk = ~clk;

  function automatic int off(input int k, input int s);
    return int'($floor(real'(k) * real'(s) / 9.0 + 0.5));
  endfunction

  // sum of pixels in columns (c0, c1] and rows (r0, r1] of the window at (ox, oy)
  function automatic longint box(input int ox, input int oy, input int c0, input int r0,
                                 input int c1, input int r1);
    longint s = 0;
    for (int y = oy + r0 + 1; y <= oy + r1; y++)
      for (int x = ox + c0 + 1; x <= ox + c1; x++) s += longint'(img[y][x]);
    return s;
  endfunction

  // normalised score of the size-s window whose top-left sample is (ox, oy)
  function automatic longint ref_score(input int s, input int ox, input int oy);
    int o [10];
    longint dxx, dyy, dxy, sq, h, k;
    for (int i = 0; i < 10; i++) o[i] = off(i, s);
    dxx = box(ox, oy, o[0], o[2], o[9], o[7]) - 3 * box(ox, oy, o[3], o[2], o[6], o[7]);
    dyy = box(ox, oy, o[2], o[0], o[7], o[9]) - 3 * box(ox, oy, o[2], o[3], o[7], o[6]);
    dxy = box(ox, oy, o[1], o[1], o[4], o[4]) + box(ox, oy, o[5], o[5], o[8], o[8])
        - box(ox, oy, o[5], o[1], o[8], o[4]) - box(ox, oy, o[1], o[5], o[4], o[8]);
    sq = dxy * dxy;
    h  = dxx * dyy - (sq - sq / 8);
    k  = longint'($floor(65536.0 * 6561.0 / (real'(s) ** 4) + 0.5));
    return (h * k) >>> 16;
  endfunction

  longint exp9 [IW], exp27 [IW];

  initial begin
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        img[y][x] = (($urandom_range(0, 3) == 0) ? 255 : int'($urandom_range(0, 60)));
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++)
        iimg[y][x] = II_W'(img[y][x]) + (x > 0 ? iimg[y][x-1] : '0) + (y > 0 ? iimg[y-1][x] : '0)
                   - ((x > 0 && y > 0) ? iimg[y-1][x-1] : '0);
    // three sweeps with different bottom lines
    for (int ybot = RLINES - 1; ybot < IH; ybot += 4) begin
      localparam int L9  = RESP_LAT + (SMAX - 1) / 2 - 4;
      localparam int L27 = RESP_LAT;
      int oy9, oy27;
      oy9  = ybot - RLINES + 1 + ((SMAX + 1) / 2 + 1 - 5);
      oy27 = ybot - RLINES + 1 + ((SMAX + 1) / 2 + 1 - 14);
      for (int x = 0; x < IW; x++) begin
        exp9[x]  = (x >= 9)  ? ref_score(9,  x - 9,  oy9)  : 0;
        exp27[x] = (x >= 27) ? ref_score(27, x - 27, oy27) : 0;
      end
      for (int t = 0; t < IW + L9 + 1; t++) begin
        for (int k = 0; k < RLINES; k++) col[k] = iimg[ybot - k][t < IW ? t : IW - 1];
        @(posedge clk);
        #1;
        // the score visible now belongs to the column that entered L-1 ticks ago
        if (t - (L9 - 1) >= 9 && t - (L9 - 1) < IW) begin
          checks++;
          if (longint'(score9) != exp9[t - (L9 - 1)]) begin
            failures++;
            $display("FAIL s9 ybot=%0d x=%0d got %0d exp %0d", ybot, t - (L9 - 1), score9, exp9[t - (L9 - 1)]);
          end
          if (score9 != 0) nonzero++;
        end
        if (t - (L27 - 1) >= 27 && t - (L27 - 1) < IW) begin
          checks++;
          if (longint'(score27) != exp27[t - (L27 - 1)]) begin
            failures++;
            $display("FAIL s27 ybot=%0d x=%0d got %0d exp %0d", ybot, t - (L27 - 1), score27, exp27[t - (L27 - 1)]);
          end
        end
      end
    end
    checks++;
    if (nonzero == 0) begin failures++; $display("FAIL all scores zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
