// tb_memory_buffer: streams random frames into memory_buffer while a bus
// slave model answers with random and long stretches of waitrequest. Every
// word must reach the bus in order with the right address and packed data,
// words that do not fit in the FIFO must be dropped with the overflow flag
// set, and line_count must follow the accepted words.
module tb_memory_buffer;
  import surf_pkg::*;

  localparam int W = 8, H = 3, HT = 12, VT = 5, DEPTH = 4;
  localparam logic [31:0] BASE = 32'h2000_0100;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [PIX_W-1:0] pix = '0;
  sync_t sync = '{blank: 1'b1, hs: 1'b0, vs: 1'b0, x: '0, y: '0};
  logic [31:0] m_address, m_writedata;
  logic m_write, m_waitrequest = 1'b0, overflow;
  logic [YW-1:0] line_count;

  int checks = 0, failures = 0;
  int n_acc = 0, n_stall = 0, n_drop = 0;

  memory_buffer #(.W(W), .FIFO_DEPTH(DEPTH)) dut (
    .pixel_clk(clk), .rst(rst), .pixel_data(pix), .sync(sync), .frame_base(BASE),
    .m_address(m_address), .m_write(m_write), .m_writedata(m_writedata),
    .m_waitrequest(m_waitrequest), .overflow(overflow), .line_count(line_count)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef struct { logic [31:0] a, d; bit sof, eol; } w_t;
  w_t q [$];

  initial begin
    logic [31:0] packw;
    int widx, lc;
    bit ovf, sofp;
    ovf = 0; lc = 0; widx = 0; sofp = 0; packw = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 12 * HT * VT; t++) begin
      int x, y;
      bit act, wr, full_b, stall;
      logic [7:0] p;
      w_t nw;
      x = t % HT; y = (t / HT) % VT;
      act = (x < W) && (y < H);
      p = act ? 8'($urandom) : 8'd0;
      // long stall in frames 3..5, random stalls elsewhere
      stall = ((t / (HT * VT)) inside {[3:5]}) ? 1'b1 : ($urandom_range(0, 2) == 0);
      pix <= p;
      sync <= '{blank: !act, hs: (x == 0), vs: (x == 0 && y == 0), x: XW'(x), y: YW'(y)};
      m_waitrequest <= stall;
      #1;
      check(m_write == (q.size() > 0), "m_write");
      if (q.size() > 0) begin
        check(m_address == q[0].a && m_writedata == q[0].d, "word");
        if (m_address != q[0].a || m_writedata != q[0].d)
          $display("  got %h:%h expected %h:%h", m_address, m_writedata, q[0].a, q[0].d);
      end
      check(line_count == YW'(lc), "line_count");
      check(overflow == ovf, "overflow");
      // model of this edge
      full_b = (q.size() == DEPTH);
      if (q.size() > 0 && !stall) begin
        if (q[0].sof) lc = q[0].eol ? 1 : 0;
        else if (q[0].eol) lc++;
        void'(q.pop_front());
        n_acc++;
      end
      if (q.size() > 0 && stall) n_stall++;
      if (act) begin
        if (x == 0 && y == 0) begin widx = 0; sofp = 1; end
        packw[8 * (x % 4) +: 8] = p;
        if (x % 4 == 3) begin
          nw.a = BASE + 32'(4 * widx); nw.d = packw; nw.sof = sofp; nw.eol = (x == W - 1);
          if (!full_b) q.push_back(nw);
          else begin ovf = 1; n_drop++; end
          widx++; sofp = 0;
        end
      end
      @(posedge clk);
    end
    check(n_acc > 0 && n_stall > 0 && n_drop > 0, "accept, stall and overflow exercised");
    $display("accepted %0d stalled %0d dropped %0d", n_acc, n_stall, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * HT * VT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
