// tb_cnn_arithmetic_unit: state equation arithmetic, latency and rate.
//
// Streams random neighbourhoods (one cell every three cycles, as the mixer
// does) through the unit in both modes, with templates strong enough to
// drive cells beyond the full signal range, and compares each result with
// the reference cell equation. Checks the latency MULT_LAT + 3 from the
// first column of a cell to its result, one result every three cycles, and
// that clipping to +1 and to -1 both happened.
module tb_cnn_arithmetic_unit;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::*;

  localparam int ML = 18, N = 60;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  core_mode_e mode;
  logic in_valid, in_sof, out_valid, out_sof;
  logic [1:0] in_phase;
  state_t s1, s2, s3, so;
  const_t cin, co;
  coef_t t1, t2, t3, z;

  cnn_arithmetic_unit #(.MULT_LAT(ML)) dut (.clk, .rst_n, .mode, .in_valid, .in_phase, .in_sof,
    .state_1(s1), .state_2(s2), .state_3(s3), .constant_in(cin),
    .template_1(t1), .template_2(t2), .template_3(t3), .z,
    .out_valid, .out_sof, .state_out(so), .constant_out(co));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int nb [N][9];
  int cf [N][19];
  int g  [N];
  int exp_s [N], exp_c [N];
  int cyc = 0, first_cyc [N];
  int nout = 0, last_out = 0, clip_hi = 0, clip_lo = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid) begin
    check(int'(so) == exp_s[nout], $sformatf("cell %0d state %0d exp %0d", nout, so, exp_s[nout]));
    check(int'(co) == exp_c[nout], $sformatf("cell %0d const %0d exp %0d", nout, co, exp_c[nout]));
    check(cyc - first_cyc[nout] == ML + 3, $sformatf("latency %0d", cyc - first_cyc[nout]));
    check(out_sof == (nout == 0 || nout == N/2), "sof passes through");
    if (nout != 0 && nout != N/2) check(cyc - last_out == 3, "rate one per 3 cycles");
    last_out = cyc;
    nout++;
  end

  task automatic run(input core_mode_e m, input int from, input int to);
    mode = m;
    for (int i = from; i < to; i++) begin
      for (int ph = 0; ph < 3; ph++) begin
        @(negedge clk);
        if (ph == 0) first_cyc[i] = cyc;
        in_valid = 1; in_phase = 2'(ph); in_sof = (i == from);
        s1 = state_t'(nb[i][0*3+ph]); s2 = state_t'(nb[i][1*3+ph]); s3 = state_t'(nb[i][2*3+ph]);
        t1 = coef_t'(cf[i][(m == MODE_CONST ? 9 : 0) + 0*3+ph]);
        t2 = coef_t'(cf[i][(m == MODE_CONST ? 9 : 0) + 1*3+ph]);
        t3 = coef_t'(cf[i][(m == MODE_CONST ? 9 : 0) + 2*3+ph]);
        z = coef_t'(cf[i][18]);
        cin = const_t'(g[i]);
      end
    end
    @(negedge clk) in_valid = 0;
    wait (nout == to);
  endtask

  initial begin
    mode = MODE_ITER; in_valid = 0; in_phase = 0; in_sof = 0;
    s1 = 0; s2 = 0; s3 = 0; cin = 0; t1 = 0; t2 = 0; t3 = 0; z = 0;
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < 9; k++) nb[i][k] = $urandom_range(0, 131072) - 65536;
      for (int k = 0; k < 19; k++) cf[i][k] = $urandom_range(0, 20000) - 10000;
      g[i] = $urandom_range(0, 200000) - 100000;
      if (i < N/2) begin
        exp_s[i] = iter_cell(nb[i], cf[i], g[i]);
        exp_c[i] = g[i];
        if (iter_clips(nb[i], cf[i], g[i])) begin
          if (exp_s[i] > 0) clip_hi++; else clip_lo++;
        end
      end else begin
        exp_s[i] = nb[i][4];
        exp_c[i] = const_cell(nb[i], cf[i]);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(MODE_ITER, 0, N/2);
    repeat (ML + 5) @(negedge clk);
    run(MODE_CONST, N/2, N);
    repeat (5) @(negedge clk);
    check(nout == N, "all cells out");
    check(clip_hi > 0 && clip_lo > 0, $sformatf("clipping exercised hi=%0d lo=%0d", clip_hi, clip_lo));
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
