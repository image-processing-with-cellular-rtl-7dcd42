// tb_cnn_ref_pkg: reference arithmetic for the CNN testbenches.
//
// Computes one cell of the discrete CNN state equation directly from its
// 3x3 neighbourhood with plain integer arithmetic, independently of the
// pipelined hardware: products of states (16 fraction bits) and template
// coefficients (12 fraction bits) are summed exactly, scaled back by an
// arithmetic shift of 12 bits (floor), then
//   iteration: x' = clip(x + sum + g, -1, +1)
//   constant : g  = sat(sum + z*16), state unchanged.
// Coefficient order: 0..8 A' row-major from the top-left, 9..17 B', 18 z.
package tb_cnn_ref_pkg;

  localparam longint ONE   = 65536;
  localparam longint CMAX  = (longint'(1) <<< 23) - 1;
  localparam longint CMIN  = -(longint'(1) <<< 23);

  // nb[k*3+l] is the state at row offset k-1, column offset l-1.
  function automatic longint conv(input int nb[9], input int coef[19], input bit use_b);
    longint acc = 0;
    for (int i = 0; i < 9; i++) acc += longint'(nb[i]) * longint'(coef[(use_b ? 9 : 0) + i]);
    return acc >>> 12;
  endfunction

  function automatic int iter_cell(input int nb[9], input int coef[19], input int g);
    longint v = longint'(nb[4]) + conv(nb, coef, 1'b0) + longint'(g);
    if (v > ONE)  v = ONE;
    if (v < -ONE) v = -ONE;
    return int'(v);
  endfunction

  function automatic bit iter_clips(input int nb[9], input int coef[19], input int g);
    longint v = longint'(nb[4]) + conv(nb, coef, 1'b0) + longint'(g);
    return (v > ONE) || (v < -ONE);
  endfunction

  function automatic int const_cell(input int nb[9], input int coef[19]);
    longint v = conv(nb, coef, 1'b1) + longint'(coef[18]) * 16;
    if (v > CMAX) v = CMAX;
    if (v < CMIN) v = CMIN;
    return int'(v);
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

endpackage
