// threshold_unit: two-level temperature threshold of the camera stream.
//
// Every pixel whose level is below thr_low (the grey level that the camera
// calibration maps to the general limit, 500 C in the source's setting) is
// cold. Inside the divertor region, which tolerates more, a pixel is cold
// below thr_high (800 C there). Everything else is hot. The source converts
// grey levels to temperatures with the camera calibration; that table is not
// part of this design, so the two limits arrive here already as grey
// levels, and the divertor region is a rectangle of rows and columns given
// at run time (the source does not describe its shape).
//
// The unit tracks the pixel position from pix_sof (first pixel of a frame)
// and pix_valid, W pixels per line. Output registered: one cycle latency,
// same valid/sof pattern as the input.
module threshold_unit #(
  parameter int W    = 496,
  parameter int PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  input  logic             pix_sof,
  input  logic [PIX_W-1:0] pix,
  input  logic [PIX_W-1:0] thr_low,
  input  logic [PIX_W-1:0] thr_high,
  input  logic [15:0]      div_row_lo,   // divertor rectangle, inclusive
  input  logic [15:0]      div_row_hi,
  input  logic [15:0]      div_col_lo,
  input  logic [15:0]      div_col_hi,
  output logic             out_valid,
  output logic             out_sof,
  output logic             hot
);

  logic [15:0] row, col, cur_row, cur_col;
  logic        in_div, is_hot;

  always_comb begin
    cur_row = pix_sof ? 16'd0 : row;
    cur_col = pix_sof ? 16'd0 : col;
    in_div  = cur_row >= div_row_lo && cur_row <= div_row_hi &&
              cur_col >= div_col_lo && cur_col <= div_col_hi;
    is_hot  = (pix >= thr_low) && (!in_div || pix >= thr_high);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      hot       <= 1'b0;
    end else begin
      out_valid <= pix_valid;
      out_sof   <= pix_valid && pix_sof;
      if (pix_valid) begin
        hot <= is_hot;
        if (cur_col == 16'(W - 1)) begin
          col <= '0;
          row <= cur_row + 16'd1;
        end else begin
          col <= cur_col + 16'd1;
          row <= cur_row;
        end
      end
    end
  end
endmodule
