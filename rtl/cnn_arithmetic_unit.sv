// cnn_arithmetic_unit: computes one new cell value every three cycles.
//
// The mixer plays a 3x3 neighbourhood out as three columns (phase 0, 1, 2)
// and the template unit supplies the matching template column. Three
// multipliers form the three state*coefficient products of a column each
// cycle; after the multiplier pipeline the column sums are accumulated over
// the three phases. Then, following the split form of the discrete CNN
// state equation,
//   MODE_ITER : x(n+1) = x(n) + sum A'(k,l) x(n) + g      clipped to [-1, 1]
//   MODE_CONST: g      = sum B'(k,l) u        + z         (state passes)
// In MODE_ITER the constant leaves unchanged; in MODE_CONST the freshly
// computed g leaves with the unchanged state u, which is also the initial
// state of the template. Products are scaled back to the state format by an
// arithmetic right shift (round towards minus infinity).
//
// The multiplier latency is the parameter MULT_LAT; the source sets it to 18
// cycles on purpose, so that the state width can change without retiming the
// controllers. From the phase-0 input of a cell to out_valid takes
// MULT_LAT + 3 cycles (21 with the default, the source says "about 20").
// out_valid is a one-cycle pulse per cell; out_sof marks the frame's first.
module cnn_arithmetic_unit
  import cnn_pkg::*;
#(
  parameter int MULT_LAT = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  core_mode_e  mode,
  input  logic        in_valid,
  input  logic [1:0]  in_phase,
  input  logic        in_sof,
  input  state_t      state_1,
  input  state_t      state_2,
  input  state_t      state_3,
  input  const_t      constant_in,   // g of the centre cell
  input  coef_t       template_1,
  input  coef_t       template_2,
  input  coef_t       template_3,
  input  coef_t       z,
  output logic        out_valid,
  output logic        out_sof,
  output state_t      state_out,
  output const_t      constant_out
);

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  typedef struct packed {
    logic       valid;
    logic [1:0] phase;
    logic       sof;
    prod_t      p1, p2, p3;
    state_t     centre;
    const_t     g;
    coef_t      z;
  } stage_t;

  stage_t pipe [MULT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MULT_LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0].valid  <= in_valid;
      pipe[0].phase  <= in_phase;
      pipe[0].sof    <= in_sof;
      pipe[0].p1     <= prod_t'(state_1) * prod_t'(template_1);
      pipe[0].p2     <= prod_t'(state_2) * prod_t'(template_2);
      pipe[0].p3     <= prod_t'(state_3) * prod_t'(template_3);
      pipe[0].centre <= state_2;
      pipe[0].g      <= constant_in;
      pipe[0].z      <= z;
      for (int i = 1; i < MULT_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  stage_t m;
  acc_t   col_sum, acc, total, scaled;
  state_t x_c;
  logic   sof_c;

  assign m       = pipe[MULT_LAT-1];
  assign col_sum = acc_t'(m.p1) + acc_t'(m.p2) + acc_t'(m.p3);
  assign total   = acc + col_sum;
  assign scaled  = total >>> TMPL_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      x_c          <= '0;
      sof_c        <= 1'b0;
      out_valid    <= 1'b0;
      out_sof      <= 1'b0;
      state_out    <= '0;
      constant_out <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (m.valid) begin
        unique case (m.phase)
          2'd0: begin acc <= col_sum; sof_c <= m.sof; end
          2'd1: begin acc <= total;   x_c <= m.centre; end
          default: begin
            out_valid <= 1'b1;
            out_sof   <= sof_c;
            if (mode == MODE_ITER) begin
              state_out    <= clip_fsr(acc_t'(x_c) + scaled + acc_t'(m.g));
              constant_out <= m.g;
            end else begin
              state_out    <= x_c;
              constant_out <= sat_const(scaled +
                                        (acc_t'(m.z) <<< (STATE_FRAC - TMPL_FRAC)));
            end
          end
        endcase
      end
    end
  end

  initial assert (MULT_LAT >= 1) else $error("MULT_LAT must be at least 1");
endmodule
