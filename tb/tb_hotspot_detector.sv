// tb_hotspot_detector: white-pixel count and alarm per frame.
//
// Sends four frames (no white pixel, one white pixel, many white pixels
// with -1 and small negative states, all black) and checks frame_done
// appears once per frame after its last pixel with the right count and
// alarm.
module tb_hotspot_detector;
  import cnn_pkg::*;

  localparam int W = 5, H = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real reset edge before the first clock edge
  always #5 clk = ~clk;

  logic in_valid, in_sof, frame_done, alarm;
  state_t st;
  logic [31:0] hp;

  hotspot_detector #(.W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_sof, .state(st),
    .frame_done, .alarm, .hot_pixels(hp));

  int checks = 0, failures = 0, ndone = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (frame_done) ndone++;

  initial begin
    in_valid = 0; in_sof = 0; st = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      automatic int n = 0;
      for (int i = 0; i < W * H; i++) begin
        automatic int v;
        case (f)
          0: v = 65536;
          1: v = (i == 7) ? -65536 : 0;
          2: v = (i % 3 == 0) ? -1 : ((i % 3 == 1) ? -65536 : 3);
          default: v = 65536;
        endcase
        if (v < 0) n++;
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); st = state_t'(v);
        @(negedge clk);
        in_valid = 0; in_sof = 0;
        if (i < W * H - 1) check(!frame_done, "no early frame_done");
        else check(frame_done && hp == 32'(n) && alarm == (n > 0),
                   $sformatf("frame %0d count %0d exp %0d alarm %0d", f, hp, n, alarm));
        @(negedge clk);
      end
    end
    check(ndone == 4, "one frame_done per frame");
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
