// tb_rline_buffer: streams random words with a cycling x_cnt and checks
// that output k equals the input of exactly k lines earlier, every tick.
module tb_rline_buffer;
  import surf_pkg::*;

  localparam int R = 5, LL = 10, DW = 16, N = 400;

  logic          clk = 1'b0;
  logic [DW-1:0] d_in = '0;
  logic [XW-1:0] x_cnt = '0;
  logic [DW-1:0] d_out [R];

  int checks = 0, failures = 0;
  logic [DW-1:0] hist [N];

  rline_buffer #(.R(R), .DW(DW), .LINE_LEN(LL)) dut (
    .pixel_clk(clk), .d_in(d_in), .x_cnt(x_cnt), .d_out(d_out)
  );

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < N; t++) begin
      hist[t] = DW'($urandom);
      d_in  <= hist[t];
      x_cnt <= XW'(t % LL);
      #1;
      for (int k = 0; k < R; k++) begin
        if (t >= k * LL) begin
          checks++;
          if (d_out[k] !== hist[t - k * LL]) begin
            failures++;
            $display("FAIL t=%0d k=%0d got %h expected %h", t, k, d_out[k], hist[t - k * LL]);
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
