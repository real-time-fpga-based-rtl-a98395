// surf_tb_harness: end-to-end test of surf_top.
//
// A camera model streams frames of noise with bright and dark blobs; it
// starts in the middle of a frame, so video_sync has to re-align to the
// camera's first frame-start pulse. A CPU model enables the interrupt,
// sets the threshold once the camera's first full frame begins and drains
// the feature FIFO through the slave port. A memory model accepts the DMA
// writes with random waitrequest. The harness checks
//   - the features read by the CPU against a reference detector that works
//     on pixel box sums (same order, coordinates and scale masks),
//   - the latency of every feature, from the camera pixel to the FIFO,
//     against 2 + DELTA_Y*H_TOTAL + DELTA_X ticks at one pixel per tick,
//   - every word written to the frame buffer against the camera image,
// and counts how often each mechanism occurred: line and frame syncs,
// re-alignment, maxima at both inner intervals, interrupts, bus stalls of
// the DMA and, in the reduced configuration, overflow of both FIFOs.
// FULL = 1 instantiates surf_top with its default parameters (1920x1080 in
// a 2048x1100 raster). VGA = 1 runs 640x480 in a 672x482 raster, which is
// 420.8 frames/s at 136.3 MHz. Both run one frame with a 512-entry feature
// FIFO that the CPU drains without pausing, so every feature must arrive.
module surf_tb_harness #(
  parameter bit FULL = 1'b0,
  parameter bit VGA  = 1'b0
);
  import surf_pkg::*;
  import surf_ref::*;

  localparam bit BIG = FULL || VGA;          // a workload-sized run
  localparam int W  = FULL ? DEF_W : VGA ? 640 : 64;
  localparam int H  = FULL ? DEF_H : VGA ? 480 : 60;
  localparam int HT = FULL ? DEF_H_TOTAL : VGA ? 672 : 72;
  localparam int VT = FULL ? DEF_V_TOTAL : VGA ? 482 : 80;
  localparam int NF = BIG ? 1 : 3;           // full camera frames
  localparam int NBLOB = FULL ? 6000 : VGA ? 900 : 16;
  localparam int FEAT_DEPTH = BIG ? 512 : 2;
  localparam int START_ROW = VT - 2;          // camera starts here, misaligned
  localparam longint THR = 2000;
  localparam logic [31:0] BASE = 32'h1000_0000;
  localparam int LAT = 2 + int'(DELTA_Y) * HT + int'(DELTA_X);
  localparam int TOTAL = (VT - START_ROW) * HT + NF * HT * VT + LAT + 4 * HT;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [PIX_W-1:0] cam_data = '0;
  logic cam_fs = 1'b0;
  logic [1:0] det_address = '0;
  logic det_read = 1'b0, det_write = 1'b0;
  logic [31:0] det_writedata = '0, det_readdata;
  logic det_readdatavalid, det_irq;
  logic [31:0] mem_address, mem_writedata;
  logic mem_write, mem_waitrequest = 1'b0, mem_overflow;
  logic [YW-1:0] mem_line_count;

  if (FULL) begin : g_dut
    surf_top dut (.*, .pixel_clk(clk), .cam_frame_start(cam_fs), .frame_base(BASE));
  end else begin : g_dut
    surf_top #(.W(W), .H(H), .H_TOTAL(HT), .V_TOTAL(VT), .FEAT_DEPTH(FEAT_DEPTH), .DMA_DEPTH(16)) dut (
      .*, .pixel_clk(clk), .cam_frame_start(cam_fs), .frame_base(BASE));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stimulus and reference ----------------
  int img [NF + 1][];
  int expq [$];            // expected features: {mask, y, x} in raster order
  int gotq [$];
  longint cam_start [NF + 1] = '{default: 0};  // edge at which pixel (0,0) of frame f is sampled
  longint edge_n = 0;
  always @(posedge clk) edge_n <= edge_n + 1;

  // mechanism counters
  int n_hs = 0, n_vs = 0, n_resync = 0, n_irq = 0, n_stall = 0, n_featovf = 0, n_memovf = 0;
  int n_scale [NDET];
  bit thr_set = 0;
  bit cpu_pause = 0;
  bit drain = 0;

  initial begin
    for (int f = 0; f <= NF; f++) begin
      int rp [];
      longint m [NSCALE][];
      make_image(img[f], W, H, NBLOB);
      if (f == 0) continue;     // the partial frame before alignment is not checked
      prefix(img[f], rp, W, H);
      for (int s = 0; s < NSCALE; s++) score_map(rp, W, H, fsize(s), m[s]);
      for (int y = MARGIN; y < H - int'(MARGIN); y++)
        for (int x = MARGIN; x < W - int'(MARGIN); x++) begin
          int mk;
          mk = maxima(m[0], m[1], m[2], m[3], W, x, y, THR);
          if (mk != 0) expq.push_back((mk << (XW + YW)) | (y << XW) | x);
        end
    end
    $display("reference: %0d features in %0d frames", expq.size(), NF);
  end

  // camera: starts at row START_ROW of frame 0, then NF full frames and a
  // flat frame that flushes the pipeline
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f <= NF + 1; f++) begin
      for (int y = (f == 0) ? START_ROW : 0; y < VT; y++)
        for (int x = 0; x < HT; x++) begin
          cam_fs <= (x == 0 && y == 0);
          cam_data <= (f <= NF && x < W && y < H) ? PIX_W'(img[f][y * W + x])
                    : (f <= NF) ? PIX_W'($urandom) : '0;
          #1;
          if (x == 0 && y == 0 && f <= NF) cam_start[f] = edge_n;
          if (x == 0 && y == 0 && (g_dut.dut.u_video_sync.xc != '0 || g_dut.dut.u_video_sync.yc != '0))
            n_resync++;
          @(posedge clk);
        end
    end
  end

  // ---------------- CPU on the slave port ----------------
  initial begin
    @(negedge rst);
    @(posedge clk);
    det_write <= 1'b1; det_address <= 2'd2; det_writedata <= 32'h7FFF_FFFF;
    @(posedge clk);
    det_address <= 2'd3; det_writedata <= 32'd1;
    @(posedge clk);
    det_write <= 1'b0;
    // wait for the first aligned frame, then set the real threshold
    wait (cam_start[1] != 0);
    @(posedge clk);
    det_write <= 1'b1; det_address <= 2'd2; det_writedata <= 32'(THR);
    @(posedge clk);
    det_write <= 1'b0; det_address <= 2'd0;
    thr_set = 1;
    forever begin
      det_read <= det_irq && !cpu_pause && !det_read;
      @(posedge clk);
    end
  end

  always @(posedge clk) begin
    if (det_readdatavalid && det_address == 2'd0 && det_readdata[31])
      gotq.push_back(int'(det_readdata[30:0]));
    if (det_irq) n_irq++;
  end

  // reduced configuration: the CPU pauses during the last frame (features
  // overflow the 2-entry FIFO) and the memory stalls for a while (DMA FIFO
  // overflows)
  always @(posedge clk) begin
    cpu_pause <= !drain && !BIG && (NF >= 3) && cam_start[NF] != 0 && edge_n >= cam_start[NF];
  end

  // ---------------- frame buffer ----------------
  int wr_frame = -1;
  always @(posedge clk) begin
    bit stall;
    stall = ($urandom_range(0, 3) == 0);
    if (!BIG && cam_start[NF] != 0 && edge_n >= cam_start[NF] + 10 * HT && edge_n < cam_start[NF] + 13 * HT)
      stall = 1;
    if (mem_write && !mem_waitrequest) begin
      int wi, px, py;
      wi = int'((mem_address - BASE) >> 2);
      if (wi == 0) wr_frame++;
      px = (wi % (W / 4)) * 4;
      py = wi / (W / 4);
      if (wr_frame >= 1 && wr_frame <= NF) begin
        logic [31:0] e;
        for (int k = 0; k < 4; k++) e[8 * k +: 8] = PIX_W'(img[wr_frame][py * W + px + k]);
        check(mem_writedata == e, "frame buffer word");
      end
    end
    if (mem_write && mem_waitrequest) n_stall++;
    mem_waitrequest <= stall;
  end

  // ---------------- latency and mechanisms ----------------
  always @(posedge clk) begin
    if (!rst) begin
      if (g_dut.dut.u_video_sync.sync.hs) n_hs++;
      if (g_dut.dut.u_video_sync.sync.vs) n_vs++;
      if (mem_overflow && n_memovf == 0) n_memovf = 1;
      if (g_dut.dut.u_detector_interface.push && thr_set) begin
        int fx, fy, f;
        longint e0, off;
        fx = int'(g_dut.dut.u_detector_interface.feat.x);
        fy = int'(g_dut.dut.u_detector_interface.feat.y);
        off = fy * HT;
        off = off + longint'(fx);
        f = NF;
        while (f > 0 && (cam_start[f] == 0 || cam_start[f] + off >= edge_n)) f--;
        e0 = cam_start[f] + off;
        check(edge_n - e0 == longint'(LAT), "feature latency");
        for (int i = 0; i < NDET; i++) if (g_dut.dut.u_detector_interface.feat.scale[i]) n_scale[i]++;
      end
      if (g_dut.dut.u_detector_interface.overflow && n_featovf == 0) n_featovf = 1;
    end
  end

  initial begin
    for (int i = 0; i < NDET; i++) n_scale[i] = 0;
    wait (!rst);
    repeat (TOTAL) @(posedge clk);
    // let the CPU drain what is left
    drain = 1;
    repeat (4 * 520) @(posedge clk);
    // features: the frames read promptly must match exactly, the paused
    // frame must be an ordered subset
    begin
      int nexp_full, j;
      nexp_full = 0;
      check(gotq.size() > 0, "features read");
      j = 0;
      for (int i = 0; i < gotq.size(); i++) begin
        while (j < expq.size() && expq[j] != gotq[i]) begin
          j++;
          nexp_full++;
        end
        check(j < expq.size(), "feature present in reference");
        if (j >= expq.size() && failures < 20)
          $display("  unexpected feature %h", gotq[i]);
        j++;
      end
      if (BIG || NF < 3) begin
        check(gotq.size() == expq.size(), "all features read");
        check(nexp_full == 0, "no feature missing");
      end else begin
        check(gotq.size() < expq.size(), "features dropped during the pause");
      end
      $display("features expected %0d read %0d", expq.size(), gotq.size());
    end
    $display("mechanisms: h_sync %0d v_sync %0d resync %0d max@int2 %0d max@int3 %0d irq %0d dma_stall %0d feat_ovf %0d dma_ovf %0d",
             n_hs, n_vs, n_resync, n_scale[0], n_scale[1], n_irq, n_stall, n_featovf, n_memovf);
    check(n_hs > 0, "h_sync seen");
    check(n_vs > 0, "v_sync seen");
    check(n_resync > 0, "re-alignment seen");
    check(n_scale[0] > 0, "maximum at interval 2");
    check(n_scale[1] > 0, "maximum at interval 3");
    check(n_irq > 0, "interrupt seen");
    check(n_stall > 0, "DMA stall seen");
    if (!BIG) begin
      check(n_featovf > 0, "feature FIFO overflow seen");
      check(n_memovf > 0, "DMA FIFO overflow seen");
    end
    $display("latency %0d ticks = %0.1f us, %0.1f frames/s at 136.3 MHz", LAT, real'(LAT) / 136.3,
             136.3e6 / real'(HT * VT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (!rst);
    repeat (TOTAL + 4 * 520 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
