// tb_cnn_memory_unit: line shift registers and zero-flux line replication.
//
// Shifts a W x H frame in line by line with the select pattern of a core
// frame (line 0 loaded twice, lines 1..H-1 loaded, two lines recirculated),
// then checks that in line times 2 .. H+1 every output triple is
// (row r-1, row r, row r+1) of window row r = line - 2, with rows outside
// the image replaced by the nearest edge row, and that the centre constant
// belongs to the centre pixel. Frames are run twice to check that the
// pointer comes back to the start of a line.
module tb_cnn_memory_unit;
  import cnn_pkg::*;
  import tb_cnn_ref_pkg::clampi;

  localparam int W = 5, H = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic shift;
  logic [1:0] in_sel;
  state_t state_in, s1, s2, s3;
  const_t constant_in, cst;

  cnn_memory_unit #(.W(W)) dut (.clk, .rst_n, .shift, .in_sel, .state_in, .constant_in,
    .state_1(s1), .state_2(s2), .state_3(s3), .constant(cst));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int pv(int f, int r, int c); return f * 1000 + r * 10 + c + 1; endfunction

  initial begin
    shift = 0; in_sel = 0; state_in = 0; constant_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int line = 0; line < H + 2; line++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          shift = 1;
          in_sel = (line == 0) ? 2'd1 : (line < H) ? 2'd0 : 2'd2;
          state_in = (line < H) ? state_t'(pv(f, line, c)) : state_t'(-1);
          constant_in = (line < H) ? const_t'(-pv(f, line, c)) : const_t'(7);
          @(negedge clk);
          shift = 0;
          if (line >= 2) begin
            automatic int r = line - 2;
            check(int'(s1) == pv(f, clampi(r-1, 0, H-1), c), $sformatf("above f%0d r%0d c%0d: %0d", f, r, c, s1));
            check(int'(s2) == pv(f, r, c), $sformatf("centre f%0d r%0d c%0d: %0d", f, r, c, s2));
            check(int'(s3) == pv(f, clampi(r+1, 0, H-1), c), $sformatf("below f%0d r%0d c%0d: %0d", f, r, c, s3));
            check(int'(cst) == -pv(f, r, c), $sformatf("const f%0d r%0d c%0d: %0d", f, r, c, cst));
          end
        end
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
