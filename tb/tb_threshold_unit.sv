// tb_threshold_unit: general and divertor thresholds.
//
// Sends two random frames through the unit and checks every pixel against
// the rule: hot if level >= thr_low and, inside the divertor rectangle,
// level >= thr_high. Counts pixels decided by the divertor rule (above the
// low but below the high limit inside the rectangle) and requires some.
module tb_threshold_unit;
  localparam int W = 10, H = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic pix_valid, pix_sof, ov, osof, hot;
  logic [7:0] pix, thr_low, thr_high;
  logic [15:0] rlo, rhi, clo, chi;

  threshold_unit #(.W(W)) dut (.clk, .rst_n, .pix_valid, .pix_sof, .pix, .thr_low, .thr_high,
    .div_row_lo(rlo), .div_row_hi(rhi), .div_col_lo(clo), .div_col_hi(chi),
    .out_valid(ov), .out_sof(osof), .hot);

  int checks = 0, failures = 0, n_div = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    pix_valid = 0; pix_sof = 0; pix = 0;
    thr_low = 100; thr_high = 180; rlo = 3; rhi = 5; clo = 2; chi = 6;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          automatic bit indiv = r >= 3 && r <= 5 && c >= 2 && c <= 6;
          automatic bit e;
          @(negedge clk);
          pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = 8'($urandom_range(60, 230));
          e = (pix >= 100) && (!indiv || pix >= 180);
          if (indiv && pix >= 100 && pix < 180) n_div++;
          @(negedge clk);
          pix_valid = 0; pix_sof = 0;
          check(ov && hot == e, $sformatf("f%0d (%0d,%0d) level %0d hot %0d", f, r, c, pix, hot));
          check(osof == (r == 0 && c == 0), "sof");
          @(negedge clk);
          check(!ov, "valid is one cycle");
        end
    check(n_div > 0, "divertor rule exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
