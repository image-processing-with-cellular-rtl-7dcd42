// tb_cnn_core: one core against the reference cell equation.
//
// Runs three frames through a small core: a constant (g) pass with a random
// B'/z template, an iteration pass with a random A' template that makes
// cells clip, and a second iteration frame started right after the first
// ends, to check that a core accepts back-to-back frames. Every output
// state and constant is compared with the reference computed from the input
// frame with zero-flux (edge-replicating) boundaries. Also checks the
// transient latency start_in -> start_out = 6W + 8 + MULT_LAT cycles, one
// output every three cycles, and exactly W*H outputs per frame.
module tb_cnn_core;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  localparam int W = 7, H = 5, ML = 18, NT = 8;
  localparam int LAT = 6 * W + 8 + ML;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  core_mode_e mode;
  logic [2:0] tmpl_sel, wr_sel;
  logic wr_en;
  logic [4:0] wr_addr;
  coef_t wr_data;
  logic start_in, in_valid, start_out, out_valid, busy;
  state_t state_in, state_out;
  const_t constant_in, constant_out;

  cnn_core #(.W(W), .H(H), .MULT_LAT(ML), .NUM_TEMPLATES(NT)) dut (
    .clk, .rst_n, .mode, .tmpl_sel, .tmpl_wr_en(wr_en), .tmpl_wr_sel(wr_sel),
    .tmpl_wr_addr(wr_addr), .tmpl_wr_data(wr_data),
    .start_in, .in_valid, .state_in, .constant_in,
    .start_out, .out_valid, .state_out, .constant_out, .busy
  );

  int checks = 0, failures = 0;
  int img [H][W];
  int gin [H][W];
  int exp_s [H][W];
  int exp_c [H][W];
  int coef [19];
  int n_out, last_out_cyc, cyc, start_cyc, sof_cyc;
  bit collecting;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_template(input int sel);
    for (int a = 0; a < 19; a++) begin
      @(negedge clk);
      wr_en = 1; wr_sel = 3'(sel); wr_addr = 5'(a); wr_data = coef_t'(coef[a]);
    end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic make_ref(input core_mode_e m);
    int nb [9];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        for (int k = 0; k < 3; k++)
          for (int l = 0; l < 3; l++)
            nb[k*3+l] = img[clampi(r+k-1, 0, H-1)][clampi(c+l-1, 0, W-1)];
        if (m == MODE_ITER) begin
          exp_s[r][c] = iter_cell(nb, coef, gin[r][c]);
          exp_c[r][c] = gin[r][c];
        end else begin
          exp_s[r][c] = img[r][c];
          exp_c[r][c] = const_cell(nb, coef);
        end
      end
  endtask

  // Output monitor: compare in raster order.
  always @(posedge clk) if (collecting && out_valid) begin
    automatic int r = n_out / W, c = n_out % W;
    if (n_out < W*H) begin
      check(int'(state_out) == exp_s[r][c],
            $sformatf("state (%0d,%0d) got %0d exp %0d", r, c, state_out, exp_s[r][c]));
      check(int'(constant_out) == exp_c[r][c],
            $sformatf("const (%0d,%0d) got %0d exp %0d", r, c, constant_out, exp_c[r][c]));
    end
    if (n_out > 0) check(cyc - last_out_cyc == 3, "output period is 3 cycles");
    if (start_out) sof_cyc = cyc;
    last_out_cyc = cyc;
    n_out++;
  end

  task automatic run_frame(input core_mode_e m, input int sel);
    mode = m; tmpl_sel = 3'(sel);
    make_ref(m);
    n_out = 0; collecting = 1; sof_cyc = -1;
    @(negedge clk);
    start_cyc = cyc;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        start_in = (r == 0 && c == 0);
        in_valid = 1;
        state_in = state_t'(img[r][c]);
        constant_in = const_t'(gin[r][c]);
        @(negedge clk);
        start_in = 0; in_valid = 0;
        @(negedge clk); @(negedge clk);
      end
    wait (n_out == W*H);
    repeat (6) @(negedge clk);
    collecting = 0;
    check(n_out == W*H, $sformatf("output count %0d", n_out));
    check(sof_cyc - start_cyc == LAT,
          $sformatf("transient latency %0d expected %0d", sof_cyc - start_cyc, LAT));
  endtask

  initial begin
    cyc = 0; collecting = 0;
    mode = MODE_ITER; tmpl_sel = 0; wr_en = 0; wr_sel = 0; wr_addr = 0; wr_data = 0;
    start_in = 0; in_valid = 0; state_in = 0; constant_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Frame 1: constant pass with template slot 2.
    for (int a = 0; a < 19; a++) coef[a] = $urandom_range(0, 8000) - 4000;
    load_template(2);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = $urandom_range(0, 2*65536) - 65536;
        gin[r][c] = 0;
      end
    run_frame(MODE_CONST, 2);
    // Frame 2: iteration with strong feedback so that some cells clip.
    for (int a = 0; a < 19; a++) coef[a] = $urandom_range(0, 6000) - 3000;
    coef[4] = 5000;
    load_template(5);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) gin[r][c] = $urandom_range(0, 65536) - 32768;
    run_frame(MODE_ITER, 5);
    // Frame 3: same template, new image, started right away.
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = (((r + c) % 3) - 1) * 65536;
    run_frame(MODE_ITER, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
