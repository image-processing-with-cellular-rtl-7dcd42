// tb_frame_averager: mean of the last N thresholded frames.
//
// Sends eight frames of random hot/cold pixels (with some pixels hot in
// every frame) and checks every output against the mean computed from the
// testbench's own record of the past frames: (N - 2*hot_count)/N in the
// state format, frames before reset counted as cold.
module tb_frame_averager;
  import cnn_pkg::*;

  localparam int W = 6, H = 4, N = 4, F = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic in_valid, in_sof, hot, ov, osof;
  state_t st;
  logic [2:0] hc;

  frame_averager #(.W(W), .H(H), .N(N)) dut (.clk, .rst_n, .in_valid, .in_sof, .hot,
    .out_valid(ov), .out_sof(osof), .state(st), .hot_count(hc));

  int checks = 0, failures = 0, n_partial = 0, n_full = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  bit past [F][H][W];

  initial begin
    in_valid = 0; in_sof = 0; hot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < F; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          automatic int cnt = 0, e;
          past[f][r][c] = (r == 1 && c < 3) ? 1'b1 : 1'($urandom_range(0, 1));
          for (int k = 0; k < N; k++) if (f - k >= 0) cnt += past[f-k][r][c];
          e = (N - 2 * cnt) * 65536 / N;
          if (cnt > 0 && cnt < N) n_partial++;
          if (cnt == N) n_full++;
          @(negedge clk);
          in_valid = 1; in_sof = (r == 0 && c == 0); hot = past[f][r][c];
          @(negedge clk);
          in_valid = 0; in_sof = 0;
          check(ov && int'(st) == e && int'(hc) == cnt,
                $sformatf("f%0d (%0d,%0d) state %0d exp %0d", f, r, c, st, e));
          check(osof == (r == 0 && c == 0), "sof");
          @(negedge clk);
        end
    check(n_partial > 0 && n_full > 0, "partial and full persistence seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
