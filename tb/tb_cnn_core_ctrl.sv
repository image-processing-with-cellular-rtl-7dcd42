// tb_cnn_core_ctrl: frame sequencing of a core.
//
// Starts two frames and checks the counts and order the controller
// produces: (H+2)*W memory shifts, one every three cycles; line 0 with the
// duplicate-load select, lines 1..H-1 with load, two lines with recirculate;
// H*W + 1 mixer strobes, each one cycle after its slot, the first W flagged
// as the first window line and with columns counting 0..W-1; busy for
// exactly 3*((H+2)*W + 1) cycles; and that the core is ready for the next
// frame at once.
module tb_cnn_core_ctrl;
  localparam int W = 4, H = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic start_in, busy, mem_shift, mix_strobe, mix_first_line;
  logic [1:0] mem_sel;
  logic [15:0] mix_cin;

  cnn_core_ctrl #(.W(W), .H(H)) dut (.clk, .rst_n, .start_in, .busy, .mem_shift, .mem_sel,
    .mix_strobe, .mix_cin, .mix_first_line);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int cyc = 0, nshift, nstrobe, last_shift, busy_cycles, last_strobe_slot;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (mem_shift) begin
      automatic int line = nshift / W;
      automatic logic [1:0] e = (line == 0) ? 2'd1 : (line < H) ? 2'd0 : 2'd2;
      check(mem_sel == e, $sformatf("select of shift %0d", nshift));
      if (nshift > 0) check(cyc - last_shift == 3, "one shift per slot");
      last_shift = cyc;
      nshift++;
    end
    if (mix_strobe) begin
      check(int'(mix_cin) == nstrobe % W, $sformatf("strobe %0d column %0d", nstrobe, mix_cin));
      check(mix_first_line == (nstrobe < W), "first window line flag");
      // The flush strobe (the last) has no shift: it comes one slot later.
      check(cyc - last_shift == ((nstrobe == H * W) ? 4 : 1), "strobe one cycle after its slot");
      nstrobe++;
    end
  end

  initial begin
    start_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      nshift = 0; nstrobe = 0; busy_cycles = 0;
      @(negedge clk) start_in = 1;
      @(negedge clk) start_in = 0;
      wait (!busy);
      @(negedge clk);
      check(nshift == (H + 2) * W, $sformatf("shift count %0d", nshift));
      check(nstrobe == H * W + 1, $sformatf("strobe count %0d", nstrobe));
      check(busy_cycles == 3 * ((H + 2) * W + 1) - 1, $sformatf("busy cycles %0d", busy_cycles));
    end
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
