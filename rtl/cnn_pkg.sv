// cnn_pkg: number formats and shared types of the CNN hot-spot pipeline.
//
// A cell state is a signed fixed-point number with STATE_FRAC fraction bits,
// limited to [-1, +1] (full signal range model: state and output coincide).
// Black is +1 and white is -1, the usual CNN convention. Template
// coefficients (the h-scaled A' and B' matrices and the bias z) use
// TMPL_FRAC fraction bits. The constant g = B'u + z travels next to each
// state with the same scaling as the state but more integer bits. All widths
// are this design's own choice; the source only says they are configurable.
package cnn_pkg;

  localparam int STATE_W    = 18;   // signed, range [-2, 2)
  localparam int STATE_FRAC = 16;   // +1.0 = 65536
  localparam int TMPL_W     = 18;   // signed, range [-32, 32)
  localparam int TMPL_FRAC  = 12;
  localparam int CONST_W    = 24;   // signed, range [-128, 128)
  localparam int PROD_W     = STATE_W + TMPL_W;     // one product
  localparam int ACC_W      = PROD_W + 4;           // sum of nine products

  localparam logic signed [STATE_W-1:0] STATE_ONE  = STATE_W'(1 << STATE_FRAC);
  localparam logic signed [STATE_W-1:0] STATE_MONE = -STATE_W'(1 << STATE_FRAC);

  // Number of coefficients held per template: 9 of A', 9 of B', then z.
  localparam int TMPL_COEFS = 19;
  localparam int Z_ADDR     = 18;

  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [TMPL_W-1:0]  coef_t;
  typedef logic signed [CONST_W-1:0] const_t;

  // What a core row computes.
  typedef enum logic {
    MODE_ITER  = 1'b0,  // x(n+1) = x(n) + sum A'x + g, clipped to [-1, 1]
    MODE_CONST = 1'b1   // g = sum B'u + z, state passed through unchanged
  } core_mode_e;

  // One element of the pixel stream between cores.
  typedef struct packed {
    state_t state;
    const_t constant;
  } pix_t;

  // Vertical triple of states, index 0 = row above, 1 = centre, 2 = row below.
  typedef state_t triple_t [3];

  // Clip a wide state-scaled value to the full signal range [-1, +1].
  function automatic state_t clip_fsr(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'(STATE_ONE)))       return STATE_ONE;
    else if (v < ACC_W'(signed'(STATE_MONE))) return STATE_MONE;
    else                                      return state_t'(v);
  endfunction

  // Saturate a wide state-scaled value into the constant format.
  function automatic const_t sat_const(input logic signed [ACC_W-1:0] v);
    localparam logic signed [ACC_W-1:0] CMAX = ACC_W'((64'sd1 <<< (CONST_W-1)) - 1);
    localparam logic signed [ACC_W-1:0] CMIN = -ACC_W'(64'sd1 <<< (CONST_W-1));
    if (v > CMAX)      return const_t'(CMAX);
    else if (v < CMIN) return const_t'(CMIN);
    else               return const_t'(v);
  endfunction

endpackage
