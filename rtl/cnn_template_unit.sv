// cnn_template_unit: template store of a CNN core.
//
// Holds NUM_TEMPLATES templates. A template is the h-scaled feedback matrix
// A' (eq. 6 of the CNN model: h*a_kl, with h*(a_00 - 1) at the centre), the
// h-scaled input matrix B' = hB and the bias z. Coefficients are written one
// at a time through the load port (address 0..8: A' row-major from the
// top-left, 9..17: B' likewise, 18: z). The read side is combinational:
// given the template selected for this core, the core's mode and the
// neighbourhood column being played out by the mixer (0 = left,
// 1 = centre, 2 = right), it presents that column's three coefficients
// (row above, centre row, row below) so that they meet the matching states
// in the arithmetic unit. In MODE_ITER the A' column is read, in MODE_CONST
// the B' column. Only the name of this unit and the fact that several
// templates are stored come from the source; the layout is this design's.
module cnn_template_unit
  import cnn_pkg::*;
#(
  parameter int NUM_TEMPLATES = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // load port
  input  logic                             wr_en,
  input  logic [$clog2(NUM_TEMPLATES)-1:0] wr_sel,
  input  logic [4:0]                       wr_addr,
  input  coef_t                            wr_data,
  // read side
  input  logic [$clog2(NUM_TEMPLATES)-1:0] rd_sel,
  input  core_mode_e                       mode,
  input  logic [1:0]                       col,
  output coef_t                            template_1,   // row above
  output coef_t                            template_2,   // centre row
  output coef_t                            template_3,   // row below
  output coef_t                            z
);

  coef_t store [NUM_TEMPLATES][TMPL_COEFS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_TEMPLATES; t++)
        for (int c = 0; c < TMPL_COEFS; c++)
          store[t][c] <= '0;
    end else if (wr_en && wr_addr < 5'(TMPL_COEFS)) begin
      store[wr_sel][wr_addr] <= wr_data;
    end
  end

  logic [4:0] base;
  always_comb begin
    base       = (mode == MODE_CONST) ? 5'd9 : 5'd0;
    base       = base + 5'(col);
    template_1 = store[rd_sel][base];
    template_2 = store[rd_sel][base + 5'd3];
    template_3 = store[rd_sel][base + 5'd6];
    z          = store[rd_sel][Z_ADDR];
  end

  a_col: assert property (@(posedge clk) disable iff (!rst_n) col != 2'd3);
endmodule
