// tb_preprocessor: feeds random frames through a small raster with blanking
// and compares every output with an integral image summed directly from
// the stored pixels.
module tb_preprocessor;
  import surf_pkg::*;

  localparam int W = 8, H = 5, HT = 12, VT = 7;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [PIX_W-1:0] pix = '0;
  sync_t            sin = '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
  logic [II_W-1:0]  ii;
  sync_t            sout;

  int checks = 0, failures = 0;
  int img [VT][HT];

  preprocessor #(.LINE_LEN(HT)) dut (
    .pixel_clk(clk), .rst(rst), .pixel_data(pix), .sync_in(sin), .ii(ii), .sync_out(sout)
  );

  always #5 clk = ~clk;

  function automatic int ref_ii(input int x, input int y);
    int s = 0;
    for (int j = 0; j <= y; j++)
      for (int i = 0; i <= x; i++) s += img[j][i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < VT; y++)
        for (int x = 0; x < HT; x++)
          img[y][x] = (x < W && y < H) ? ((f == 1) ? 255 : int'($urandom_range(0, 255))) : 0;
      for (int y = 0; y < VT; y++) begin
        for (int x = 0; x < HT; x++) begin
          pix <= PIX_W'(img[y][x]);
          sin <= '{blank: !(x < W && y < H), hs: (x == 0), vs: (x == 0 && y == 0),
                   x: XW'(x), y: YW'(y)};
          @(posedge clk);
          #1;
          checks++;
          if (ii != II_W'(ref_ii(x, y)) || sout.x != XW'(x) || sout.y != YW'(y)) begin
            failures++;
            $display("FAIL f%0d (%0d,%0d): ii=%0d expected %0d", f, x, y, ii, ref_ii(x, y));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
