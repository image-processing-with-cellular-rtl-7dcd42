// tb_cnn_core_array: a two-template program on a chain of overlapped rows.
//
// Program: template 0 for one iteration, template 1 for two, so the array
// has 2 + 3 = 5 rows (a constant row in front of each template). Random
// templates and a random frame; the final image is compared with the
// reference program (for each template: g = B'u + z once, x(0) = u, then
// the iterations). Checks the overlapped latency ROWS * (6W + 8 + MULT_LAT)
// from frame start to the first result, which is far below the
// ROWS * 3*W*H a row-after-row schedule would need, and W*H results.
module tb_cnn_core_array;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  localparam int W = 6, H = 5, ML = 4, NT = 4, NS = 2;
  localparam int ITERS [NS] = '{1, 2};
  localparam int ROWS = NS + 3;
  localparam int LAT = ROWS * (6 * W + 8 + ML);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic wr_en, start_in, in_valid, start_out, out_valid, busy;
  logic [1:0] wr_sel;
  logic [4:0] wr_addr;
  coef_t wr_data;
  state_t state_in, state_out;
  const_t constant_out;

  cnn_core_array #(.W(W), .H(H), .MULT_LAT(ML), .NUM_TEMPLATES(NT), .NUM_STAGES(NS),
                   .STAGE_ITERS(ITERS)) dut (
    .clk, .rst_n, .tmpl_wr_en(wr_en), .tmpl_wr_sel(wr_sel), .tmpl_wr_addr(wr_addr),
    .tmpl_wr_data(wr_data), .start_in, .in_valid, .state_in, .constant_in('0),
    .start_out, .out_valid, .state_out, .constant_out, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int cf [NS][19];
  int x [H][W], g [H][W], nx [H][W], u [H][W];
  int cyc = 0, start_cyc, sof_cyc, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Neighbourhood of the current reference image x, edges replicated.
  task automatic gather(input int r, input int c, output int nb [9]);
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 3; l++)
        nb[k*3+l] = x[clampi(r+k-1, 0, H-1)][clampi(c+l-1, 0, W-1)];
  endtask

  always @(posedge clk) if (out_valid) begin
    if (start_out) sof_cyc = cyc;
    check(int'(state_out) == x[nout / W][nout % W],
          $sformatf("pixel %0d got %0d exp %0d", nout, state_out, x[nout / W][nout % W]));
    check(int'(constant_out) == g[nout / W][nout % W], $sformatf("pixel %0d constant", nout));
    nout++;
  end

  initial begin
    int nb [9];
    wr_en = 0; wr_sel = 0; wr_addr = 0; wr_data = 0; start_in = 0; in_valid = 0; state_in = 0;
    for (int s = 0; s < NS; s++)
      for (int a = 0; a < 19; a++) cf[s][a] = $urandom_range(0, 5000) - 2500;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        u[r][c] = $urandom_range(0, 131072) - 65536;
        x[r][c] = u[r][c];
      end
    // Reference program.
    for (int s = 0; s < NS; s++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          gather(r, c, nb);
          g[r][c] = const_cell(nb, cf[s]);
        end
      for (int i = 0; i < ITERS[s]; i++) begin
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++) begin
            gather(r, c, nb);
            nx[r][c] = iter_cell(nb, cf[s], g[r][c]);
          end
        x = nx;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int a = 0; a < 19; a++) begin
        @(negedge clk);
        wr_en = 1; wr_sel = 2'(s); wr_addr = 5'(a); wr_data = coef_t'(cf[s][a]);
      end
    @(negedge clk) wr_en = 0;
    start_cyc = cyc;
    for (int i = 0; i < W * H; i++) begin
      start_in = (i == 0); in_valid = 1; state_in = state_t'(u[i / W][i % W]);
      if (i == 0) start_cyc = cyc;
      @(negedge clk);
      start_in = 0; in_valid = 0;
      @(negedge clk); @(negedge clk);
    end
    wait (nout == W * H);
    repeat (10) @(negedge clk);
    check(nout == W * H, "result count");
    check(sof_cyc - start_cyc == LAT, $sformatf("latency %0d expected %0d", sof_cyc - start_cyc, LAT));
    check(LAT < 3 * W * H * ROWS, "rows overlap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
