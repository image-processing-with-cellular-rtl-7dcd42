// tb_cnn_mixer_unit: neighbourhood play-out and left/right edge replication.
//
// Feeds triples of H window rows of W columns (one strobe every three
// cycles, plus the final flush slot) and checks that each cell comes out as
// left, centre, right column on three consecutive cycles, that edge columns
// are replicated, that the centre constant is the centre pixel's, that the
// first cell is flagged and that W*H cells come out.
module tb_cnn_mixer_unit;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::clampi;

  localparam int W = 4, H = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic strobe, first_line, ov, osof;
  logic [15:0] cin;
  logic [1:0] oph;
  state_t i1, i2, i3, o1, o2, o3;
  const_t ic, oc;

  cnn_mixer_unit #(.W(W)) dut (.clk, .rst_n, .strobe, .cin, .first_line,
    .in_1(i1), .in_2(i2), .in_3(i3), .in_const(ic),
    .out_valid(ov), .out_phase(oph), .out_sof(osof), .out_1(o1), .out_2(o2), .out_3(o3), .out_const(oc));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Value of window row r, column c, triple element k.
  function automatic int tv(int r, int c, int k); return r * 100 + c * 10 + k + 1; endfunction

  int ncell = 0, nph = 0;
  always @(posedge clk) if (ov) begin
    automatic int r = ncell / W, c = ncell % W;
    automatic int cc = clampi(c + int'(oph) - 1, 0, W - 1);
    check(int'(oph) == nph, "phase order 0,1,2");
    check(int'(o1) == tv(r, cc, 0) && int'(o2) == tv(r, cc, 1) && int'(o3) == tv(r, cc, 2),
          $sformatf("cell %0d phase %0d got %0d %0d %0d", ncell, oph, o1, o2, o3));
    check(int'(oc) == -tv(r, c, 1), $sformatf("cell %0d const %0d", ncell, oc));
    check(osof == (ncell == 0), "sof flag");
    nph = (nph + 1) % 3;
    if (oph == 2'd2) ncell++;
  end

  initial begin
    strobe = 0; first_line = 0; cin = 0; i1 = 0; i2 = 0; i3 = 0; ic = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r <= H; r++)
      for (int c = 0; c < W; c++) begin
        if (r == H && c > 0) break;
        @(negedge clk);
        strobe = 1; cin = 16'(c); first_line = (r == 0);
        i1 = state_t'(tv(r, c, 0)); i2 = state_t'(tv(r, c, 1)); i3 = state_t'(tv(r, c, 2));
        ic = const_t'(-tv(r, c, 1));
        @(negedge clk) strobe = 0;
        @(negedge clk);
      end
    repeat (6) @(negedge clk);
    check(ncell == W * H, $sformatf("cell count %0d", ncell));
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
