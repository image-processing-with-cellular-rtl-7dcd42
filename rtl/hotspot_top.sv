// hotspot_top: real-time hot-spot recognition on infrared camera frames.
//
// Pipeline: camera grey levels -> threshold_unit (two temperature limits,
// a higher one in the divertor) -> frame_averager (mean of the last N
// thresholded frames, so only lasting hot regions stay white) ->
// cnn_core_array (the CNN template program, one core row per iteration,
// rows overlapped) -> hotspot_detector (alarm if any white pixel survives).
//
// Interface: the camera stream must bring one pixel every third clock cycle
// during a frame (pix_valid), row by row, W pixels per line, H lines, the
// first pixel flagged by pix_sof; frames must be at least (H+2)*W*3 + 3
// cycles apart. Templates are loaded through tmpl_wr_* (template s of the
// program at index s; coefficient address 0..8 A', 9..17 B', 18 z). The
// final CNN image comes out on res_* in the same stream format, and
// frame_done/alarm/hot_pixels report each frame's verdict.
// Latency of a frame: about ROWS * (6W + 8 + MULT_LAT) + 3*W*H cycles.
module hotspot_top
  import cnn_pkg::*;
#(
  parameter int W             = 496,
  parameter int H             = 560,
  parameter int PIX_W         = 8,
  parameter int AVG_FRAMES    = 4,
  parameter int MULT_LAT      = 18,
  parameter int NUM_TEMPLATES = 8,
  parameter int NUM_STAGES    = 5,
  parameter int STAGE_ITERS [NUM_STAGES] = '{1, 6, 4, 2, 10},
  parameter int ALARM_MIN     = 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // camera stream
  input  logic                             pix_valid,
  input  logic                             pix_sof,
  input  logic [PIX_W-1:0]                 pix,
  // threshold configuration (grey levels of the two temperature limits)
  input  logic [PIX_W-1:0]                 thr_low,
  input  logic [PIX_W-1:0]                 thr_high,
  input  logic [15:0]                      div_row_lo,
  input  logic [15:0]                      div_row_hi,
  input  logic [15:0]                      div_col_lo,
  input  logic [15:0]                      div_col_hi,
  // template load port
  input  logic                             tmpl_wr_en,
  input  logic [$clog2(NUM_TEMPLATES)-1:0] tmpl_wr_sel,
  input  logic [4:0]                       tmpl_wr_addr,
  input  coef_t                            tmpl_wr_data,
  // processed image
  output logic                             res_valid,
  output logic                             res_sof,
  output state_t                           res_state,
  // verdict
  output logic                             frame_done,
  output logic                             alarm,
  output logic [31:0]                      hot_pixels,
  output logic                             busy
);

  logic th_valid, th_sof, th_hot;

  threshold_unit #(.W(W), .PIX_W(PIX_W)) u_thr (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix,
    .thr_low, .thr_high, .div_row_lo, .div_row_hi, .div_col_lo, .div_col_hi,
    .out_valid(th_valid), .out_sof(th_sof), .hot(th_hot)
  );

  logic   av_valid, av_sof;
  state_t av_state;
  logic [$clog2(AVG_FRAMES+1)-1:0] av_count;

  frame_averager #(.W(W), .H(H), .N(AVG_FRAMES)) u_avg (
    .clk, .rst_n, .in_valid(th_valid), .in_sof(th_sof), .hot(th_hot),
    .out_valid(av_valid), .out_sof(av_sof), .state(av_state), .hot_count(av_count)
  );

  const_t res_const;

  cnn_core_array #(
    .W(W), .H(H), .MULT_LAT(MULT_LAT), .NUM_TEMPLATES(NUM_TEMPLATES),
    .NUM_STAGES(NUM_STAGES), .STAGE_ITERS(STAGE_ITERS)
  ) u_array (
    .clk, .rst_n,
    .tmpl_wr_en, .tmpl_wr_sel, .tmpl_wr_addr, .tmpl_wr_data,
    .start_in(av_sof), .in_valid(av_valid), .state_in(av_state), .constant_in('0),
    .start_out(res_sof), .out_valid(res_valid), .state_out(res_state),
    .constant_out(res_const), .busy
  );

  hotspot_detector #(.W(W), .H(H), .ALARM_MIN(ALARM_MIN)) u_det (
    .clk, .rst_n, .in_valid(res_valid), .in_sof(res_sof), .state(res_state),
    .frame_done, .alarm, .hot_pixels
  );

endmodule
