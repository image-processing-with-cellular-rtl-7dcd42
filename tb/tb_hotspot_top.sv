// tb_hotspot_top: end-to-end hot-spot recognition on a reduced frame size.
//
// A W x H camera sees, over NF frames, a persistent hot blob (from frame 1
// on), random one-frame flickers, a second blob that lives for two frames
// only, and a warm patch in the divertor region that is hot by the general
// limit but not by the divertor limit. A five-template program (shortened
// iteration counts) runs on it. The testbench computes the whole chain
// itself - thresholds, four-frame mean, the template program with
// zero-flux boundaries, white-pixel count - and compares every result pixel
// and every frame verdict. It counts how often each mechanism of the design
// took place and fails if one never did: divertor limit deciding a pixel,
// partial persistence (mean strictly between -1 and +1), constant rows,
// clipping to the signal range, overlapped rows (a row starting while the
// row above is still busy), frames with and without alarm.
module tb_hotspot_top;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  localparam int W = 12, H = 8, ML = 4, NT = 8, NS = 5, NF = 7, AVG = 4;
  localparam int ITERS [NS] = '{1, 2, 1, 1, 2};
  localparam int ROWS = NS + 7;
  localparam int FRAME_GAP = 3 * (2 * W + 1) + 40;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic pix_valid, pix_sof, wr_en, res_valid, res_sof, frame_done, alarm, busy;
  logic [7:0] pix;
  logic [2:0] wr_sel;
  logic [4:0] wr_addr;
  coef_t wr_data;
  state_t res_state;
  logic [31:0] hot_pixels;

  hotspot_top #(.W(W), .H(H), .AVG_FRAMES(AVG), .MULT_LAT(ML), .NUM_TEMPLATES(NT),
                .NUM_STAGES(NS), .STAGE_ITERS(ITERS)) dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix,
    .thr_low(8'd120), .thr_high(8'd200),
    .div_row_lo(16'(H - 3)), .div_row_hi(16'(H - 1)), .div_col_lo(16'd0), .div_col_hi(16'(W / 2)),
    .tmpl_wr_en(wr_en), .tmpl_wr_sel(wr_sel), .tmpl_wr_addr(wr_addr), .tmpl_wr_data(wr_data),
    .res_valid, .res_sof, .res_state, .frame_done, .alarm, .hot_pixels, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Templates, Q12 coefficients (4096 = 1.0), h folded in.
  int cf [NS][19];
  initial begin
    for (int s = 0; s < NS; s++) for (int a = 0; a < 19; a++) cf[s][a] = 0;
    // 0: keep only fully persistent pixels white: x' = 2x + u + 1.75
    cf[0][4] = 4096; cf[0][9+4] = 4096; cf[0][18] = 7168;
    // 1: grow white horizontally: x' = x + (u_l + u_c + u_r) - 2
    cf[1][9+3] = 4096; cf[1][9+4] = 4096; cf[1][9+5] = 4096; cf[1][18] = -8192;
    // 2: vertical smoothing with feedback: x' = x + 0.5(up + down) - 0.5x + 0.25
    cf[2][1] = 2048; cf[2][7] = 2048; cf[2][4] = -2048; cf[2][18] = 1024;
    // 3: shrink: x' = 2x + 0.5 * sum of 8 neighbours of u
    cf[3][4] = 4096;
    for (int k = 0; k < 9; k++) if (k != 4) cf[3][9+k] = 2048;
    // 4: remove small objects: x' = 2x + 0.25 * sum of 8 neighbours of x + 0.5
    cf[4][4] = 4096; cf[4][18] = 2048;
    for (int k = 0; k < 9; k++) if (k != 4) cf[4][k] = 1024;
  end

  // Reference model state.
  bit hist [AVG][H][W];
  int frame_img [H][W];
  int x [H][W], g [H][W], nx [H][W];
  int exp_img [NF][H][W];
  int exp_white [NF];
  int n_div = 0, n_partial = 0, n_clip = 0, n_alarm = 0, n_quiet = 0, n_const_rows = 0;
  int n_overlap = 0;

  function automatic int level(int f, int r, int c);
    int v = 60 + ((r * 7 + c * 3 + f) % 20);
    if (f >= 1 && r >= 1 && r <= 3 && c >= 5 && c <= 8) v = 230;           // lasting blob
    if (f >= 2 && f <= 3 && r == 2 && c >= 1 && c <= 2) v = 215;           // short blob
    if (r >= H - 2 && c <= 3) v = 160;                                     // warm divertor patch
    if (((f * 31 + r * 17 + c * 13) % 23) == 0) v = 250;                   // flicker
    return v;
  endfunction

  // Neighbourhood of the current reference image x, edges replicated.
  task automatic gather(input int r, input int c, output int nb [9]);
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 3; l++)
        nb[k*3+l] = x[clampi(r+k-1, 0, H-1)][clampi(c+l-1, 0, W-1)];
  endtask

  task automatic reference(input int f);
    int nb [9];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int lv = level(f, r, c), cnt = 0;
        automatic bit indiv = r >= H - 3 && c <= W / 2;
        automatic bit hot = lv >= 120 && (!indiv || lv >= 200);
        if (indiv && lv >= 120 && lv < 200) n_div++;
        for (int k = AVG - 1; k > 0; k--) hist[k][r][c] = hist[k-1][r][c];
        hist[0][r][c] = hot;
        for (int k = 0; k < AVG; k++) if (f - k >= 0) cnt += hist[k][r][c];
        if (cnt > 0 && cnt < AVG) n_partial++;
        x[r][c] = (AVG - 2 * cnt) * 65536 / AVG;
      end
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
            if (iter_clips(nb, cf[s], g[r][c])) n_clip++;
          end
        x = nx;
      end
    end
    exp_white[f] = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        exp_img[f][r][c] = x[r][c];
        if (x[r][c] < 0) exp_white[f]++;
      end
  endtask

  // Result monitor.
  int out_frame = -1, out_idx = 0, done_frames = 0;
  always @(posedge clk) if (res_valid) begin
    if (res_sof) begin out_frame++; out_idx = 0; end
    if (out_frame >= 0 && out_frame < NF)
      check(int'(res_state) == exp_img[out_frame][out_idx / W][out_idx % W],
            $sformatf("frame %0d pixel %0d got %0d exp %0d", out_frame, out_idx, res_state,
                      exp_img[out_frame][out_idx / W][out_idx % W]));
    out_idx++;
  end
  always @(posedge clk) if (frame_done) begin
    check(hot_pixels == 32'(exp_white[done_frames]) && alarm == (exp_white[done_frames] > 0),
          $sformatf("frame %0d verdict: %0d white, alarm %0d; expected %0d", done_frames,
                    hot_pixels, alarm, exp_white[done_frames]));
    if (alarm) n_alarm++; else n_quiet++;
    done_frames++;
  end

  // Mechanism monitors inside the array.
  always @(posedge clk) begin
    if (dut.u_array.g_row[1].u_core.start_in && dut.u_array.g_row[0].u_core.busy) n_overlap++;
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_mon
    always @(posedge clk)
      if (dut.u_array.g_row[r].u_core.start_in && dut.u_array.g_row[r].u_core.mode == MODE_CONST)
        n_const_rows++;
  end

  initial begin
    pix_valid = 0; pix_sof = 0; pix = 0; wr_en = 0; wr_sel = 0; wr_addr = 0; wr_data = 0;
    for (int k = 0; k < AVG; k++) for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) hist[k][r][c] = 0;
    for (int f = 0; f < NF; f++) reference(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int a = 0; a < 19; a++) begin
        @(negedge clk);
        wr_en = 1; wr_sel = 3'(s); wr_addr = 5'(a); wr_data = coef_t'(cf[s][a]);
      end
    @(negedge clk) wr_en = 0;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < W * H; i++) begin
        pix_valid = 1; pix_sof = (i == 0); pix = 8'(level(f, i / W, i % W));
        @(negedge clk);
        pix_valid = 0; pix_sof = 0;
        @(negedge clk); @(negedge clk);
      end
      repeat (FRAME_GAP) @(negedge clk);
    end
    wait (done_frames == NF);
    repeat (10) @(negedge clk);
    check(done_frames == NF, "all frames judged");
    $display("mechanisms: divertor=%0d partial=%0d const_rows=%0d clip=%0d overlap=%0d alarm=%0d quiet=%0d",
             n_div, n_partial, n_const_rows, n_clip, n_overlap, n_alarm, n_quiet);
    check(n_div > 0, "divertor limit used");
    check(n_partial > 0, "partial persistence seen");
    check(n_const_rows == NS * NF, "one constant row per template and frame");
    check(n_clip > 0, "clipping to the signal range");
    check(n_overlap == NF, "rows overlap");
    check(n_alarm > 0, "frame with alarm");
    check(n_quiet > 0, "frame without alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
