// hotspot_detector: raises the alarm when white regions survive the CNN.
//
// After the template program only regions large and persistent enough to be
// hot spots are left white (negative state). Detecting a hot spot is then a
// matter of checking whether any white pixel remains: the unit counts the
// white pixels of each output frame and, with the frame's last pixel,
// reports the count, the alarm (count >= ALARM_MIN, one pixel by default)
// and a one-cycle frame_done pulse. The counting rule is the source's; the
// minimum count is this design's parameter.
module hotspot_detector
  import cnn_pkg::*;
#(
  parameter int W         = 496,
  parameter int H         = 560,
  parameter int ALARM_MIN = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sof,
  input  state_t      state,
  output logic        frame_done,
  output logic        alarm,
  output logic [31:0] hot_pixels
);

  localparam int PIXELS = W * H;

  logic [31:0] idx, cur_idx, cnt, cur_cnt;

  always_comb begin
    cur_idx = in_sof ? 32'd0 : idx;
    cur_cnt = (in_sof ? 32'd0 : cnt) + ((state < 0) ? 32'd1 : 32'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      cnt        <= '0;
      frame_done <= 1'b0;
      alarm      <= 1'b0;
      hot_pixels <= '0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid) begin
        idx <= cur_idx + 32'd1;
        cnt <= cur_cnt;
        if (cur_idx == 32'(PIXELS - 1)) begin
          frame_done <= 1'b1;
          hot_pixels <= cur_cnt;
          alarm      <= (cur_cnt >= 32'(ALARM_MIN));
        end
      end
    end
  end
endmodule
