// cnn_core_array: the chain of core rows that runs a whole template program.
//
// Each core row performs one iteration; a template that is iterated n times
// needs n rows. Before the first iteration of every template the chain has
// one extra row in MODE_CONST that computes g = B'u + z once for the whole
// template (the input u is constant while the template runs) and passes the
// state u on unchanged as the initial state. So a program of NUM_STAGES
// templates with STAGE_ITERS iterations occupies
//   ROWS = NUM_STAGES + sum(STAGE_ITERS)
// rows, template s being stored at index s of every row's template unit.
// The default program is the hot-spot sequence: PointRemoval variant (1
// iteration), DirectedGrowingShadow (6), ConcaveFiller (4), ObjectIncreasing
// (2) and SmallObjectRemover (10); the template coefficients are loaded at
// run time through the shared load port.
//
// Rows are chained start-to-start: a row starts as soon as the row above
// delivers its first new state, so a frame needs about ROWS * T_t + T_c
// cycles instead of ROWS * T_c. This design has one core column; splitting
// the image into vertical stripes over several columns is not built.
module cnn_core_array
  import cnn_pkg::*;
#(
  parameter int W             = 496,
  parameter int H             = 560,
  parameter int MULT_LAT      = 18,
  parameter int NUM_TEMPLATES = 8,
  parameter int NUM_STAGES    = 5,
  parameter int STAGE_ITERS [NUM_STAGES] = '{1, 6, 4, 2, 10}
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             tmpl_wr_en,
  input  logic [$clog2(NUM_TEMPLATES)-1:0] tmpl_wr_sel,
  input  logic [4:0]                       tmpl_wr_addr,
  input  coef_t                            tmpl_wr_data,
  input  logic                             start_in,
  input  logic                             in_valid,
  input  state_t                           state_in,
  input  const_t                           constant_in,
  output logic                             start_out,
  output logic                             out_valid,
  output state_t                           state_out,
  output const_t                           constant_out,
  output logic                             busy
);

  function automatic int total_rows();
    int n = NUM_STAGES;
    for (int s = 0; s < NUM_STAGES; s++) n += STAGE_ITERS[s];
    return n;
  endfunction

  localparam int ROWS = total_rows();

  // Template index of row r.
  function automatic int row_stage(int r);
    int first = 0;
    for (int s = 0; s < NUM_STAGES; s++) begin
      if (r < first + 1 + STAGE_ITERS[s]) return s;
      first += 1 + STAGE_ITERS[s];
    end
    return NUM_STAGES - 1;
  endfunction

  // Row r is the constant row of its template if it is the template's first.
  function automatic bit row_is_const(int r);
    int first = 0;
    for (int s = 0; s < NUM_STAGES; s++) begin
      if (r == first) return 1'b1;
      first += 1 + STAGE_ITERS[s];
    end
    return 1'b0;
  endfunction

  logic   st   [ROWS+1];
  logic   vld  [ROWS+1];
  state_t sv   [ROWS+1];
  const_t cv   [ROWS+1];
  logic   bsy  [ROWS];

  assign st[0]  = start_in;
  assign vld[0] = in_valid;
  assign sv[0]  = state_in;
  assign cv[0]  = constant_in;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam core_mode_e MODE = row_is_const(r) ? MODE_CONST : MODE_ITER;
    localparam int         TSEL = row_stage(r);
    cnn_core #(.W(W), .H(H), .MULT_LAT(MULT_LAT), .NUM_TEMPLATES(NUM_TEMPLATES)) u_core (
      .clk, .rst_n,
      .mode(MODE), .tmpl_sel(($clog2(NUM_TEMPLATES))'(TSEL)),
      .tmpl_wr_en, .tmpl_wr_sel, .tmpl_wr_addr, .tmpl_wr_data,
      .start_in(st[r]), .in_valid(vld[r]), .state_in(sv[r]), .constant_in(cv[r]),
      .start_out(st[r+1]), .out_valid(vld[r+1]), .state_out(sv[r+1]),
      .constant_out(cv[r+1]), .busy(bsy[r])
    );
  end

  always_comb begin
    busy = 1'b0;
    for (int r = 0; r < ROWS; r++) busy |= bsy[r];
  end

  assign start_out    = st[ROWS];
  assign out_valid    = vld[ROWS];
  assign state_out    = sv[ROWS];
  assign constant_out = cv[ROWS];

  initial assert (NUM_STAGES <= NUM_TEMPLATES)
    else $error("program has more templates than the template units hold");
endmodule
