// tb_feature_detector: feeds the integral image of random frames with
// bright and dark blobs into feature_detector (a 48x48 raster without
// blanking) and compares feature_data, for every interior pixel, with the
// reference maxima at the documented latency of DELTA_Y lines plus
// DELTA_X ticks.
module tb_feature_detector;
  import surf_pkg::*;
  import surf_ref::*;

  localparam int W = 48, H = 48, NF = 2;
  localparam longint THR = 2000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [II_W-1:0] ii = '0;
  sync_t sin = '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
  logic [NDET-1:0] fdata;
  sync_t sout;

  int checks = 0, failures = 0;
  int hits [NDET];
  int img [NF][];
  int rp [NF][];
  int expm [NF][H][W];

  feature_detector #(.LINE_LEN(W)) dut (
    .pixel_clk(clk), .rst(rst), .ii(ii), .sync_in(sin), .threshold(SC_W'(THR)),
    .feature_data(fdata), .sync_out(sout)
  );

  always #5 clk = ~clk;

  initial begin
    hits[0] = 0; hits[1] = 0;
    for (int f = 0; f < NF; f++) begin
      longint m [NSCALE][];
      make_image(img[f], W, H, 6);
      prefix(img[f], rp[f], W, H);
      for (int s = 0; s < NSCALE; s++) score_map(rp[f], W, H, fsize(s), m[s]);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          expm[f][y][x] = (x >= MARGIN && x < W - MARGIN && y >= MARGIN && y < H - MARGIN)
                        ? maxima(m[0], m[1], m[2], m[3], W, x, y, THR) : -1;
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < NF + 1; f++) begin
      logic [II_W-1:0] acc [W];
      for (int y = 0; y < H; y++) begin
        logic [II_W-1:0] row;
        row = '0;
        for (int x = 0; x < W; x++) begin
          int n, pf, px, py;
          if (f < NF) row += II_W'(img[f][y * W + x]);
          acc[x] = ((y == 0) ? '0 : acc[x]) + row;
          ii  <= acc[x];
          sin <= '{blank: 1'b0, hs: (x == 0), vs: (x == 0 && y == 0), x: XW'(x), y: YW'(y)};
          #1;
          // the flags now refer to DELTA_Y lines and DELTA_X pixels earlier
          n  = (f * H + y) * W + x - int'(DELTA_Y) * W - int'(DELTA_X);
          pf = n / (W * H); py = (n / W) % H; px = n % W;
          if (n >= 0 && pf < NF && expm[pf][py][px] >= 0) begin
            checks++;
            if (int'(fdata) != expm[pf][py][px]) begin
              failures++;
              $display("FAIL frame %0d (%0d,%0d) got %b expected %b", pf, px, py, fdata, expm[pf][py][px]);
            end
            for (int i = 0; i < NDET; i++) if (expm[pf][py][px][i]) hits[i]++;
          end
          @(posedge clk);
        end
      end
    end
    for (int i = 0; i < NDET; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL no feature at interval %0d", i + 2); end
    end
    $display("features: interval2 %0d interval3 %0d", hits[0], hits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NF + 1) * W * H + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
