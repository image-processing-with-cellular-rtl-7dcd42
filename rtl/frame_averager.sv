// frame_averager: per-pixel mean of the last N thresholded frames.
//
// A single frame cannot tell a lasting hot spot from a flash. The CNN is
// therefore fed, for every pixel, the mean of its thresholded value over the
// current and the N-1 previous frames (N = 4 in the source). A hot pixel
// counts as white (-1), a cold one as black (+1), so the mean is
//   (N - 2*hot_count) / N,
// which is +1 for a pixel never hot, -1 for a pixel hot in all N frames and
// a grey level in between. The history of the N-1 previous frames is kept as
// N-1 bits per pixel in a W*H-entry memory, read and rewritten in the slot
// of each pixel. After reset, frames that have not been seen yet count as
// cold. N must be a power of two so the division is a shift. Whether the
// source averages the thresholded frames or the raw grey levels is not fully
// clear; this design averages the thresholded frames.
//
// Output registered: one cycle latency, same valid/sof pattern as the input.
module frame_averager
  import cnn_pkg::*;
#(
  parameter int W = 496,
  parameter int H = 560,
  parameter int N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic                   hot,
  output logic                   out_valid,
  output logic                   out_sof,
  output state_t                 state,
  output logic [$clog2(N+1)-1:0] hot_count
);

  localparam int PIXELS = W * H;
  localparam int AW     = $clog2(PIXELS);
  localparam int LOGN   = $clog2(N);
  localparam int CW     = $clog2(N + 1);

  logic [N-2:0]  hist [PIXELS];
  logic [AW-1:0] addr, cur_addr;
  logic [CW-1:0] seen, cur_seen;       // previous frames available (<= N-1)
  logic          started;

  logic [N-2:0]  old_bits, mask;
  logic [CW-1:0] count;
  logic [N-2:0]  new_bits;             // newest frame enters at bit 0

  always_comb begin
    cur_addr = in_sof ? '0 : addr;
    if (!in_sof)            cur_seen = seen;
    else if (!started)      cur_seen = '0;
    else if (seen < CW'(N - 1)) cur_seen = seen + 1'b1;
    else                    cur_seen = seen;
    old_bits = hist[cur_addr];
    for (int i = 0; i < N - 1; i++) mask[i] = (CW'(i) < cur_seen);
    count = CW'(hot);
    for (int i = 0; i < N - 1; i++) count += CW'(old_bits[i] & mask[i]);
    new_bits = (old_bits << 1) | (N-1)'(hot);
  end

  always_ff @(posedge clk) begin
    if (in_valid) hist[cur_addr] <= new_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      seen      <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      state     <= '0;
      hot_count <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid && in_sof;
      if (in_valid) begin
        addr      <= (cur_addr == AW'(PIXELS - 1)) ? '0 : cur_addr + 1'b1;
        seen      <= cur_seen;
        started   <= 1'b1;
        hot_count <= count;
        state     <= state_t'(((N - 2 * int'(count)) <<< STATE_FRAC) >>> LOGN);
      end
    end
  end

  initial assert ((1 << LOGN) == N && N >= 2)
    else $error("N must be a power of two, at least 2");
endmodule
