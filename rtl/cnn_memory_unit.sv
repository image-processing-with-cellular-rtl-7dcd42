// cnn_memory_unit: the three line shift registers of a CNN core.
//
// States arrive serially, one per pixel slot, row by row. They enter the
// first shift register (SR A), whose output feeds SR B, whose output feeds
// SR C; each register is one image line (W entries) long. At every shift the
// three register outputs form a vertical triple: SR C holds the row above,
// SR B the centre row and SR A the row below. The constant g of each pixel
// travels with it through SR A and SR B, so the centre constant comes out
// next to the centre state.
//
// Zero-flux boundary: while the first line enters (in_sel = LOAD_DUP) it is
// written into SR A and SR B at once, so after two line times SR B and SR C
// both hold line 0 and the first triple is (line 0, line 0, line 1). After
// the last line (in_sel = RECIRC) SR A recirculates its own output, which
// repeats the last line below the bottom row. These two rules follow the
// source's description of the fill (first two registers both filled with the
// first line); the recirculation at the bottom edge is this design's own way
// of completing the boundary.
//
// Interface/timing: one shift per asserted `shift`; the outputs are
// registered and valid the cycle after the shift. The three registers are a
// single circular buffer with a shared pointer (one RAM per register).
module cnn_memory_unit
  import cnn_pkg::*;
#(
  parameter int W = 496               // image line length
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,
  input  logic [1:0]      in_sel,     // 0: LOAD, 1: LOAD_DUP, 2: RECIRC
  input  state_t          state_in,
  input  const_t          constant_in,
  output state_t          state_1,    // row above
  output state_t          state_2,    // centre row
  output state_t          state_3,    // row below
  output const_t          constant    // constant of the centre pixel
);

  localparam logic [1:0] SEL_LOAD = 2'd0, SEL_DUP = 2'd1, SEL_RECIRC = 2'd2;
  localparam int PW = (W > 1) ? $clog2(W) : 1;

  pix_t   mem_a [W];
  pix_t   mem_b [W];
  state_t mem_c [W];
  logic [PW-1:0] ptr;

  pix_t   a_old, b_old, a_new, b_new;
  state_t c_old;

  always_comb begin
    a_old = mem_a[ptr];
    b_old = mem_b[ptr];
    c_old = mem_c[ptr];
    unique case (in_sel)
      SEL_DUP:    begin a_new = '{state_in, constant_in}; b_new = '{state_in, constant_in}; end
      SEL_RECIRC: begin a_new = a_old;                      b_new = a_old; end
      SEL_LOAD:   begin a_new = '{state_in, constant_in}; b_new = a_old; end
      default:    begin a_new = a_old;                      b_new = a_old; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      mem_a[ptr] <= a_new;
      mem_b[ptr] <= b_new;
      mem_c[ptr] <= b_old.state;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      state_1  <= '0;
      state_2  <= '0;
      state_3  <= '0;
      constant <= '0;
    end else if (shift) begin
      ptr      <= (ptr == PW'(W-1)) ? '0 : ptr + 1'b1;
      state_1  <= c_old;
      state_2  <= b_old.state;
      state_3  <= a_old.state;
      constant <= b_old.constant;
    end
  end

  // The pointer must be at the start of a line whenever a frame begins; the
  // controller guarantees it by always shifting whole lines.
endmodule
