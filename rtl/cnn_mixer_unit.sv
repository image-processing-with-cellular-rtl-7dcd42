// cnn_mixer_unit: arranges memory-unit triples into 3x3 neighbourhoods.
//
// Every pixel slot the memory unit delivers one vertical triple (rows above,
// centre, below) of column `cin`. The mixer keeps the last two triples and,
// once the triple to the right of a centre column has arrived, plays the
// neighbourhood out to the arithmetic unit over three cycles: left column
// (phase 0), centre column (phase 1), right column (phase 2). So every three
// cycles the arithmetic unit has the nine states of one new cell, as the
// source describes. Zero-flux boundary at the left and right image edges:
// the missing column is a copy of the edge column. The centre column of the
// last pixel of a line is played out in the slot that brings column 0 of
// the next line (or in one extra flush slot at the end of the frame).
//
// The constant g of the centre pixel is carried along with the centre
// column, so that it reaches the arithmetic unit aligned with its state.
//
// Timing: `strobe` at most once every three cycles, in the cycle the memory
// unit outputs are valid. Outputs follow one cycle later for three cycles
// (out_valid, out_phase 0..2). out_sof marks the three cycles of the first
// cell of a frame; out_col the centre column index.
module cnn_mixer_unit
  import cnn_pkg::*;
#(
  parameter int W = 496
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            strobe,
  input  logic [15:0]     cin,          // column of the incoming triple
  input  logic            first_line,   // incoming triple belongs to window row 0
  input  state_t          in_1,         // row above
  input  state_t          in_2,         // centre row
  input  state_t          in_3,         // row below
  input  const_t          in_const,     // constant of the centre pixel
  output logic            out_valid,
  output logic [1:0]      out_phase,
  output logic            out_sof,
  output state_t          out_1,
  output state_t          out_2,
  output state_t          out_3,
  output const_t          out_const
);

  // History: h1 = previous triple, h2 = the one before.
  state_t h1 [3];
  state_t h2 [3];
  const_t hc1;
  // Neighbourhood being played out.
  state_t wl [3];
  state_t wc [3];
  state_t wr [3];
  const_t wconst;
  logic   wsof;
  logic [1:0] phase;
  logic   busy;

  state_t nl [3];
  state_t nc [3];
  state_t nr [3];
  logic   emit, emit_sof;

  always_comb begin
    emit     = 1'b0;
    emit_sof = 1'b0;
    nl = h2;
    nc = h1;
    nr = h1;
    if (cin != 16'd0) begin
      // Centre column cin-1 with its right neighbour arriving now.
      emit     = 1'b1;
      emit_sof = first_line && (cin == 16'd1);
      nl = (cin == 16'd1) ? h1 : h2;     // left edge: replicate column 0
      nr = '{in_1, in_2, in_3};
    end else begin
      // Last column of the previous line: right edge replicated.
      emit = !first_line;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      phase  <= '0;
      wsof   <= 1'b0;
      hc1    <= '0;
      wconst <= '0;
      for (int k = 0; k < 3; k++) begin
        h1[k] <= '0; h2[k] <= '0; wl[k] <= '0; wc[k] <= '0; wr[k] <= '0;
      end
    end else begin
      if (busy) begin
        phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
        if (phase == 2'd2) busy <= 1'b0;
      end
      if (strobe) begin
        if (emit) begin
          wl     <= nl;
          wc     <= nc;
          wr     <= nr;
          wconst <= hc1;
          wsof   <= emit_sof;
          busy   <= 1'b1;
          phase  <= '0;
        end
        h2  <= h1;
        h1  <= '{in_1, in_2, in_3};
        hc1 <= in_const;
      end
    end
  end

  always_comb begin
    out_valid = busy;
    out_phase = phase;
    out_sof   = busy && wsof;
    out_const = wconst;
    unique case (phase)
      2'd0:    begin out_1 = wl[0]; out_2 = wl[1]; out_3 = wl[2]; end
      2'd1:    begin out_1 = wc[0]; out_2 = wc[1]; out_3 = wc[2]; end
      default: begin out_1 = wr[0]; out_2 = wr[1]; out_3 = wr[2]; end
    endcase
  end

  a_col_range: assert property (@(posedge clk) disable iff (!rst_n)
                                strobe |-> cin < 16'(W));

  // A new neighbourhood may only start once the previous one is played out.
  a_slot_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                   strobe && emit |-> !busy || phase == 2'd2);
endmodule
