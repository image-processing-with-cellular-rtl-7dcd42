// cnn_core: one CNN iteration over a whole frame (one core of the array).
//
// Structure as in the source's core diagram: a memory unit (three line
// shift registers) turns the incoming state stream into vertical triples, a
// mixer unit arranges them into 3x3 neighbourhoods, a template unit supplies
// the matching template coefficients and an arithmetic unit evaluates the
// state equation. A controller FSM sequences the frame. The constant g of
// each pixel travels with its state; in this design it reaches the
// arithmetic unit through the mixer (held with the centre column) instead
// of on a separate path, which keeps it aligned with its cell.
//
// Interface: in_valid/state_in/constant_in carry one pixel every third
// cycle, start_in marks the first pixel of a frame. The outputs use the same
// format: out_valid every third cycle, start_out with the first new state.
// `mode` and `tmpl_sel` choose what the core computes (see cnn_arithmetic_unit
// and cnn_template_unit); templates are loaded through the tmpl_wr_* port.
// Latency from start_in to start_out (the transient T_t of the source):
// two line times of fill (6W cycles), one slot (3 cycles) for the right-hand
// neighbour column, the memory unit output register and the mixer (1 cycle
// each) and the arithmetic unit (MULT_LAT + 3 cycles): 6W + 8 + MULT_LAT
// cycles, 3002 with W = 496 and MULT_LAT = 18 (the source: about 3000).
module cnn_core
  import cnn_pkg::*;
#(
  parameter int W             = 496,
  parameter int H             = 560,
  parameter int MULT_LAT      = 18,
  parameter int NUM_TEMPLATES = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  core_mode_e                       mode,
  input  logic [$clog2(NUM_TEMPLATES)-1:0] tmpl_sel,
  input  logic                             tmpl_wr_en,
  input  logic [$clog2(NUM_TEMPLATES)-1:0] tmpl_wr_sel,
  input  logic [4:0]                       tmpl_wr_addr,
  input  coef_t                            tmpl_wr_data,
  // input stream
  input  logic                             start_in,
  input  logic                             in_valid,
  input  state_t                           state_in,
  input  const_t                           constant_in,
  // output stream
  output logic                             start_out,
  output logic                             out_valid,
  output state_t                           state_out,
  output const_t                           constant_out,
  output logic                             busy
);

  logic        mem_shift, mix_strobe, mix_first_line;
  logic [1:0]  mem_sel;
  logic [15:0] mix_cin;

  cnn_core_ctrl #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n, .start_in, .busy,
    .mem_shift, .mem_sel, .mix_strobe, .mix_cin, .mix_first_line
  );

  state_t m_s1, m_s2, m_s3;
  const_t m_const;

  cnn_memory_unit #(.W(W)) u_mem (
    .clk, .rst_n,
    .shift(mem_shift), .in_sel(mem_sel),
    .state_in, .constant_in,
    .state_1(m_s1), .state_2(m_s2), .state_3(m_s3), .constant(m_const)
  );

  logic       x_valid, x_sof;
  logic [1:0] x_phase;
  state_t     x_s1, x_s2, x_s3;
  const_t     x_const;

  cnn_mixer_unit #(.W(W)) u_mix (
    .clk, .rst_n,
    .strobe(mix_strobe), .cin(mix_cin), .first_line(mix_first_line),
    .in_1(m_s1), .in_2(m_s2), .in_3(m_s3), .in_const(m_const),
    .out_valid(x_valid), .out_phase(x_phase), .out_sof(x_sof),
    .out_1(x_s1), .out_2(x_s2), .out_3(x_s3), .out_const(x_const)
  );

  coef_t t1, t2, t3, tz;

  cnn_template_unit #(.NUM_TEMPLATES(NUM_TEMPLATES)) u_tmpl (
    .clk, .rst_n,
    .wr_en(tmpl_wr_en), .wr_sel(tmpl_wr_sel), .wr_addr(tmpl_wr_addr), .wr_data(tmpl_wr_data),
    .rd_sel(tmpl_sel), .mode, .col(x_phase),
    .template_1(t1), .template_2(t2), .template_3(t3), .z(tz)
  );

  cnn_arithmetic_unit #(.MULT_LAT(MULT_LAT)) u_arith (
    .clk, .rst_n, .mode,
    .in_valid(x_valid), .in_phase(x_phase), .in_sof(x_sof),
    .state_1(x_s1), .state_2(x_s2), .state_3(x_s3), .constant_in(x_const),
    .template_1(t1), .template_2(t2), .template_3(t3), .z(tz),
    .out_valid, .out_sof(start_out), .state_out, .constant_out
  );

  // The input stream must present a pixel in exactly the slots in which the
  // controller loads one (lines 0 .. H-1 of a frame).
  a_stream_period: assert property (@(posedge clk) disable iff (!rst_n)
                                    mem_shift && mem_sel != 2'd2 |-> in_valid)
    else $error("input pixel missing in its slot");
endmodule
