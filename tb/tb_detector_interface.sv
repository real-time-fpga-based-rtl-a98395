// tb_detector_interface: drives a raster with random feature flags and a
// CPU that reads the slave port at random, and checks coordinates (pipeline
// latency subtracted, border discarded), FIFO order, overflow, status,
// threshold and interrupt registers against a queue model.
module tb_detector_interface;
  import surf_pkg::*;

  localparam int W = 40, H = 36, HT = 48, VT = 40, DEPTH = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [NDET-1:0] fdata = '0;
  sync_t sync = '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
  logic signed [SC_W-1:0] threshold;
  logic [1:0] address = '0;
  logic read = 1'b0, write = 1'b0;
  logic [31:0] writedata = '0, readdata;
  logic readdatavalid, irq;

  int checks = 0, failures = 0;
  int n_push = 0, n_drop = 0, n_pop = 0, n_border = 0, n_irq = 0;

  detector_interface #(.W(W), .H(H), .H_TOTAL(HT), .V_TOTAL(VT), .FIFO_DEPTH(DEPTH)) dut (
    .pixel_clk(clk), .rst(rst), .feature_data(fdata), .sync(sync), .threshold(threshold),
    .address(address), .read(read), .write(write), .writedata(writedata),
    .readdata(readdata), .readdatavalid(readdatavalid), .irq(irq)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] q [$];
  bit   ovf = 0;
  bit   irq_en = 0;
  int   frames = 0;

  // one bus access outside the streaming loop
  task automatic bus(input bit wr, input logic [1:0] a, input logic [31:0] d, output logic [31:0] rd);
    address <= a; write <= wr; read <= !wr; writedata <= d;
    @(posedge clk);
    address <= '0; write <= 1'b0; read <= 1'b0;
    #1 rd = readdata;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] rd;
    logic [31:0] exp_rd;
    bit   exp_valid;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    bus(1, 2'd2, 32'hFFFF_FF00, rd);           // threshold -256
    check(threshold == -256, "threshold port");
    bus(0, 2'd2, 0, rd);
    check(rd == 32'hFFFF_FF00, "threshold read-back");
    bus(1, 2'd3, 1, rd); irq_en = 1;
    bus(0, 2'd3, 0, rd);
    check(rd == 1, "control read-back");
    exp_valid = 0;
    for (int t = 0; t < 3 * HT * VT; t++) begin
      int px, py, n;
      bit pulse, inimg, full_b, do_rd;
      int x, y;
      logic [NDET-1:0] f;
      x = t % HT;
      y = (t / HT) % VT;
      // CPU: drain in bursts, stay idle for long stretches to force overflow
      do_rd = irq && (((t / 1000) % 2) == 0) && ($urandom_range(0, 3) == 0);
      f = ($urandom_range(0, 2) == 0) ? NDET'($urandom_range(1, 3)) : '0;
      pulse = (f != 0);
      n = t - int'(DELTA_Y) * HT - int'(DELTA_X);
      n = ((n % (HT * VT)) + HT * VT) % (HT * VT);
      px = n % HT; py = n / HT;
      inimg = px >= MARGIN && px < W - MARGIN && py >= MARGIN && py < H - MARGIN;
      sync  <= '{blank: !(x < W && y < H), hs: (x == 0), vs: (x == 0 && y == 0), x: XW'(x), y: YW'(y)};
      fdata <= f;
      address <= 2'd0; read <= do_rd; write <= 1'b0;
      #1;
      check(irq == (irq_en && q.size() > 0), "irq");
      if (irq) n_irq++;
      if (exp_valid) begin
        check(readdatavalid && readdata == exp_rd, "feature read");
        if (readdata != exp_rd) $display("  got %h expected %h", readdata, exp_rd);
      end
      // model of this tick's edge
      exp_valid = do_rd;
      exp_rd = (q.size() > 0) ? q[0] : 32'd0;
      full_b = (q.size() == DEPTH);
      if (do_rd && q.size() > 0) begin void'(q.pop_front()); n_pop++; end
      if (pulse && !inimg) n_border++;
      if (pulse && inimg && !full_b) begin
        q.push_back({1'b1, 31'({f, YW'(py), XW'(px)})});
        n_push++;
      end
      if (pulse && inimg && full_b) begin ovf = 1; n_drop++; end
      if (x == 0 && y == 0) frames++;
      @(posedge clk);
    end
    read <= 1'b0; fdata <= '0;
    @(posedge clk);
    #1;
    if (exp_valid) check(readdata == exp_rd, "last feature read");
    bus(0, 2'd1, 0, rd);
    check(rd[15:0] == 16'(q.size()), "status count");
    check(rd[16] == ovf, "status overflow");
    check(rd[31:24] == 8'(frames), "frame counter");
    bus(1, 2'd1, 32'h1_0000, rd);
    bus(0, 2'd1, 0, rd);
    check(rd[16] == 0, "overflow cleared");
    check(n_push > 0 && n_drop > 0 && n_pop > 0 && n_border > 0 && n_irq > 0, "all cases exercised");
    $display("pushed %0d dropped %0d popped %0d border %0d", n_push, n_drop, n_pop, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * HT * VT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
