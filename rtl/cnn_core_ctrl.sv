// cnn_core_ctrl: finite-state machine that sequences one CNN core.
//
// A frame reaches a core as a strictly periodic stream: one state every
// three clock cycles (one "pixel slot"), row by row, the first one marked
// by start_in. The controller counts slots (column, line) and drives:
//   * the memory unit: a shift in the first cycle of every slot of lines
//     0 .. H+1; line 0 is loaded twice (top zero-flux copy), lines 1..H-1
//     normally, and in the two lines after the image the first register
//     recirculates (bottom zero-flux copy);
//   * the mixer: a strobe one cycle after each shift of lines 2 .. H+1,
//     which are the H lines in which the memory unit outputs a window row,
//     plus one flush slot (line H+2, column 0) that lets the mixer play out
//     the last pixel.
// A frame therefore occupies the core for (H+2)*W + 1 slots; the first new
// state appears two line times plus the mixer and arithmetic latency after
// start_in, which is the transient the source calls T_t. start_in is only
// accepted while the core is idle.
module cnn_core_ctrl #(
  parameter int W = 496,
  parameter int H = 560
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_in,
  output logic        busy,
  output logic        mem_shift,
  output logic [1:0]  mem_sel,      // 0 LOAD, 1 LOAD_DUP, 2 RECIRC
  output logic        mix_strobe,
  output logic [15:0] mix_cin,
  output logic        mix_first_line
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e      st;
  logic [1:0]  phase;
  logic [15:0] col, line;

  logic        slot;
  logic [15:0] cur_col, cur_line;

  always_comb begin
    slot     = (st == S_IDLE) ? start_in : (phase == 2'd0);
    cur_col  = (st == S_IDLE) ? 16'd0 : col;
    cur_line = (st == S_IDLE) ? 16'd0 : line;
    mem_shift = slot && (cur_line <= 16'(H + 1));
    if (cur_line == 16'd0)       mem_sel = 2'd1;
    else if (cur_line < 16'(H))  mem_sel = 2'd0;
    else                         mem_sel = 2'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= S_IDLE;
      phase          <= '0;
      col            <= '0;
      line           <= '0;
      mix_strobe     <= 1'b0;
      mix_cin        <= '0;
      mix_first_line <= 1'b0;
    end else begin
      mix_strobe     <= slot && (cur_line >= 16'd2);
      mix_cin        <= cur_col;
      mix_first_line <= (cur_line == 16'd2);
      unique case (st)
        S_IDLE: if (start_in) begin
          st    <= S_RUN;
          phase <= 2'd1;
          col   <= '0;
          line  <= '0;
        end
        S_RUN: begin
          phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
          if (phase == 2'd2) begin
            if (line == 16'(H + 2)) begin
              st <= S_IDLE;                // flush slot done
            end else if (col == 16'(W - 1)) begin
              col  <= '0;
              line <= line + 16'd1;
            end else begin
              col <= col + 16'd1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st == S_RUN);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 start_in |-> st == S_IDLE)
    else $error("frame started while the core is still busy");
endmodule
