// castle_reg_array: register array A of a CASTLE processor.
//
// Holds the three state lines the 3x3 neighbourhood needs and the line that
// is arriving:
//   a0        serial input line. Each in_valid shifts one cell in at the
//             right end (position CELLS) and every cell one place left, so
//             after CELLS shifts a0[1] holds the first cell of the line.
//   a1,a2,a3  the newest, middle and oldest complete lines, positions
//             1..CELLS, plus the edge registers at positions 0 and M=CELLS+1
//             that hold the neighbouring processors' boundary cells.
// On line_shift (one cycle, at the end of a line period) a0 moves into a1,
// a1 into a2 and a2 into a3, edge registers included. The new edge registers
// of a1 take the last cell of the left neighbour's a0 (left_in) and the
// first cell of the right neighbour's a0 (right_in); a processor at the
// left or right edge of the whole array (bnd_left / bnd_right) instead
// copies its own first / last cell, a zero-flux boundary built from its own
// register lines.
//
// Read port (combinational): rrow selects a3 (ROW_UP), a2 (ROW_MID) or a1
// (ROW_DOWN), rcol (1..CELLS) a cell; v[0..2] are the cells rcol-1, rcol,
// rcol+1 of that line.
//
// The four lines, the serial filling of a0 and the edge registers follow
// the CASTLE register array. The processor reads the lines through a
// multiplexer here, where the silicon rotates a3; the zero-flux boundary is
// this design's choice.
module castle_reg_array
  import castle_pkg::*;
#(
  parameter int unsigned M = CELLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // serial input (IBUS1)
  input  logic        in_valid,
  input  state_t      in_data,
  // line transfer
  input  logic        line_shift,
  input  logic        bnd_left,
  input  logic        bnd_right,
  input  state_t      left_in,    // left neighbour's a0[M]
  input  state_t      right_in,   // right neighbour's a0[1]
  output state_t      a0_first,   // own a0[1]  (to left neighbour)
  output state_t      a0_last,    // own a0[M]  (to right neighbour)
  // neighbourhood read
  input  nrow_e       rrow,
  input  logic [$clog2(M+2)-1:0] rcol,
  output state_t      v [3]
);

  state_t a0 [1:M];
  state_t a1 [0:M+1];
  state_t a2 [0:M+1];
  state_t a3 [0:M+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j <= M; j++) a0[j] <= '0;
      for (int j = 0; j <= M + 1; j++) begin
        a1[j] <= '0; a2[j] <= '0; a3[j] <= '0;
      end
    end else if (en) begin
      if (in_valid) begin
        for (int j = 1; j < M; j++) a0[j] <= a0[j+1];
        a0[M] <= in_data;
      end
      if (line_shift) begin
        for (int j = 1; j <= M; j++) a1[j] <= a0[j];
        a1[0]   <= bnd_left  ? a0[1] : left_in;
        a1[M+1] <= bnd_right ? a0[M] : right_in;
        a2 <= a1;
        a3 <= a2;
      end
    end
  end

  assign a0_first = a0[1];
  assign a0_last  = a0[M];

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      unique case (rrow)
        ROW_UP:   v[k] = a3[int'(rcol) - 1 + k];
        ROW_MID:  v[k] = a2[int'(rcol) - 1 + k];
        default:  v[k] = a1[int'(rcol) - 1 + k];
      endcase
    end
  end

endmodule
