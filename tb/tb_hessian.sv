// tb_hessian: random and extreme box responses; the score must equal
// Dxx*Dyy - (Dxy^2 - floor(Dxy^2/8)) exactly three ticks later.
module tb_hessian;
  import surf_pkg::*;

  localparam int N = 300, LAT = 3;

  logic clk = 1'b0;
  logic signed [D_W-1:0] dxx = '0, dyy = '0, dxy = '0;
  logic signed [H_W-1:0] score;

  int checks = 0, failures = 0;
  longint expect_q [N];

  hessian dut (.clk(clk), .dxx(dxx), .dyy(dyy), .dxy(dxy), .feature_score(score));

  always #5 clk = ~clk;

  function automatic logic signed [D_W-1:0] rnd(input int t);
    case (t % 4)
      0: return D_W'($urandom);
      1: return D_W'(-(1 << (D_W - 1)) + 1);
      2: return D_W'((1 << (D_W - 1)) - 1);
      default: return D_W'($urandom_range(0, 40)) - D_W'(20);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        logic signed [D_W-1:0] a, b, c;
        longint sq;
        a = rnd(t); b = rnd(t + 1); c = rnd(t + 2);
        dxx <= a; dyy <= b; dxy <= c;
        sq = longint'(c) * longint'(c);
        expect_q[t] = longint'(a) * longint'(b) - (sq - sq / 8);
      end
      @(posedge clk);
      #1;
      if (t >= LAT - 1 && t - (LAT - 1) < N) begin
        checks++;
        if (longint'(score) != expect_q[t - (LAT - 1)]) begin
          failures++;
          $display("FAIL t=%0d got %0d expected %0d", t, score, expect_q[t - (LAT - 1)]);
        end
      end
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
