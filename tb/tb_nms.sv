// tb_nms: streams random score triplets, with planted peaks, and compares
// the maxima flags with a 26-neighbour search over the stored stream, two
// ticks after the examined column entered.
module tb_nms;
  import surf_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic signed [SC_W-1:0] scores [NSCALE][3];
  logic signed [SC_W-1:0] threshold = 40;
  logic [NDET-1:0] is_max;

  int checks = 0, failures = 0;
  int hits [NDET];
  longint hist [N][NSCALE][3];

  nms dut (.clk(clk), .rst(rst), .scores(scores), .threshold(threshold), .is_max(is_max));

  always #5 clk = ~clk;

  function automatic bit ref_max(input int t, input int m);
    longint v = hist[t][m][1];
    if (v <= longint'(threshold)) return 0;
    for (int dt = -1; dt <= 1; dt++)
      for (int s = m - 1; s <= m + 1; s++)
        for (int r = 0; r < 3; r++)
          if (!(dt == 0 && s == m && r == 1) && hist[t + dt][s][r] >= v) return 0;
    return 1;
  endfunction

  initial begin
    for (int i = 0; i < NDET; i++) hits[i] = 0;
    for (int s = 0; s < NSCALE; s++) for (int r = 0; r < 3; r++) scores[s][r] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < N; t++) begin
      for (int s = 0; s < NSCALE; s++)
        for (int r = 0; r < 3; r++) begin
          hist[t][s][r] = longint'($urandom_range(0, 50)) - 5;
          if (r == 1 && s >= 1 && s <= 2 && $urandom_range(0, 9) == 0)
            hist[t][s][r] = 60 + longint'($urandom_range(0, 20));
          scores[s][r] = SC_W'(hist[t][s][r]);
        end
      @(posedge clk);
      #1;
      // flags visible now refer to the column that entered at t-1
      if (t >= 3) begin
        for (int m = 1; m <= NSCALE - 2; m++) begin
          bit e;
          e = ref_max(t - 1, m);
          checks++;
          if (is_max[m-1] != e) begin
            failures++;
            $display("FAIL t=%0d m=%0d got %0b expected %0b", t - 1, m, is_max[m-1], e);
          end
          if (e) hits[m-1]++;
        end
      end
    end
    for (int i = 0; i < NDET; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL no maximum at interval %0d", i + 2); end
    end
    $display("maxima found: %0d %0d", hits[0], hits[1]);
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
