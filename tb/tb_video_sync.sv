// tb_video_sync: checks the raster counters, sync pulses, blanking and the
// re-alignment input of video_sync against an independent position model.
module tb_video_sync;
  import surf_pkg::*;

  localparam int unsigned W = 8, H = 4, HT = 12, VT = 6;

  logic             clk = 1'b0;
  logic             rst = 1'b1;
  logic [PIX_W-1:0] cam_data = '0;
  logic             cam_fs = 1'b0;
  logic [PIX_W-1:0] pixel_data;
  sync_t            sync;

  int checks = 0, failures = 0;

  video_sync #(.W(W), .H(H), .H_TOTAL(HT), .V_TOTAL(VT)) dut (
    .pixel_clk(clk), .rst(rst), .cam_data(cam_data), .cam_frame_start(cam_fs),
    .pixel_data(pixel_data), .sync(sync)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int mx, my;            // model position of the pixel sampled this tick
  logic [PIX_W-1:0] prev_data;
  int prev_x, prev_y;
  int resyncs = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    mx = 0; my = 0;
    for (int n = 0; n < 3 * HT * VT; n++) begin
      cam_data <= PIX_W'($urandom);
      cam_fs   <= (n == 100) || (n == 150);
      @(posedge clk);
      // model: a frame-start pulse puts the sampled pixel at (0,0)
      if (cam_fs) begin mx = 0; my = 0; resyncs++; end
      prev_data = cam_data;
      prev_x = mx; prev_y = my;
      #1;
      check(sync.x == XW'(prev_x) && sync.y == YW'(prev_y), "position");
      check(sync.blank == !(prev_x < W && prev_y < H), "blank");
      check(sync.hs == (prev_x == 0), "h_sync");
      check(sync.vs == (prev_x == 0 && prev_y == 0), "v_sync");
      check(pixel_data == ((prev_x < W && prev_y < H) ? prev_data : '0), "pixel_data");
      mx++;
      if (mx == HT) begin mx = 0; my = (my == VT - 1) ? 0 : my + 1; end
    end
    check(resyncs == 2, "re-alignment exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
