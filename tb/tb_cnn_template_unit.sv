// tb_cnn_template_unit: template storage and column read-out.
//
// Loads random coefficients into every template slot, then for each slot,
// mode and column checks that the three coefficients presented are the
// A' (iteration mode) or B' (constant mode) column, top to bottom, and that
// z is read. Also checks that writes to an address beyond z are ignored.
module tb_cnn_template_unit;
  import cnn_pkg::*;

  localparam int NT = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic wr_en;
  logic [1:0] wr_sel, rd_sel;
  logic [4:0] wr_addr;
  coef_t wr_data, t1, t2, t3, z;
  core_mode_e mode;
  logic [1:0] col;

  cnn_template_unit #(.NUM_TEMPLATES(NT)) dut (.clk, .rst_n, .wr_en, .wr_sel, .wr_addr, .wr_data,
    .rd_sel, .mode, .col, .template_1(t1), .template_2(t2), .template_3(t3), .z);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int ref_c [NT][19];

  initial begin
    wr_en = 0; wr_sel = 0; wr_addr = 0; wr_data = 0; rd_sel = 0; mode = MODE_ITER; col = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++)
      for (int a = 0; a < 19; a++) begin
        ref_c[t][a] = $urandom_range(0, 100000) - 50000;
        ref_c[t][a] = int'(coef_t'(ref_c[t][a]));
        @(negedge clk);
        wr_en = 1; wr_sel = 2'(t); wr_addr = 5'(a); wr_data = coef_t'(ref_c[t][a]);
      end
    @(negedge clk);
    wr_addr = 5'd19; wr_data = 12345; wr_sel = 0;   // out of range, must be ignored
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < NT; t++)
      for (int m = 0; m < 2; m++)
        for (int c = 0; c < 3; c++) begin
          rd_sel = 2'(t); mode = core_mode_e'(m); col = 2'(c);
          #1;
          check(int'(t1) == ref_c[t][m*9 + 0 + c], $sformatf("t%0d m%0d c%0d row -1", t, m, c));
          check(int'(t2) == ref_c[t][m*9 + 3 + c], $sformatf("t%0d m%0d c%0d row 0", t, m, c));
          check(int'(t3) == ref_c[t][m*9 + 6 + c], $sformatf("t%0d m%0d c%0d row +1", t, m, c));
          check(int'(z) == ref_c[t][18], $sformatf("t%0d z", t));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
