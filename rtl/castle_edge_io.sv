// castle_edge_io: the two time-multiplexed I/O buses of a CASTLE chip.
//
// Processors inside a chip exchange their edge cells over dedicated wires.
// Between chips that would need one port per row and direction, so each side
// of the chip has one bidirectional bus (I/O_LEFT, I/O_RIGHT) that carries
// the edge cells of all rows in turn. In each line period the timing unit
// opens four slots, after the last row has received its line:
//   slot r        (r < ROWS)  right-to-left: the chip drives I/O_LEFT with the
//                             first cell of row r's input line and captures
//                             I/O_RIGHT into right_rx[r] (the right
//                             neighbour chip's first cell);
//   slot ROWS+r               left-to-right: the chip drives I/O_RIGHT with
//                             the last cell of row r's input line and captures
//                             I/O_LEFT into left_rx[r].
// A chip at the left (right) edge of the cascade never drives its left
// (right) bus; its edge processors then build the boundary themselves.
// A bidirectional pad is written as separate out, output-enable and in
// signals (io_*_o, io_*_oe, io_*_i); joining them into a tristate pad is
// left to the pad ring. Captured values change only at a slot and are read
// by the processors at the following line_shift.
//
// Two buses shared in time multiplex follow the CASTLE array; the slot order
// and the split pad signals are this design's choices.
module castle_edge_io
  import castle_pkg::*;
#(
  parameter int unsigned ROWS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        chip_left_edge,
  input  logic        chip_right_edge,
  input  logic        slot_v,
  input  logic [1:0]  slot,
  input  state_t      left_tx  [ROWS],   // first cell of each row's a0
  input  state_t      right_tx [ROWS],   // last cell of each row's a0
  output state_t      left_rx  [ROWS],
  output state_t      right_rx [ROWS],
  // I/O_LEFT
  output state_t      io_left_o,
  output logic        io_left_oe,
  input  state_t      io_left_i,
  // I/O_RIGHT
  output state_t      io_right_o,
  output logic        io_right_oe,
  input  state_t      io_right_i
);

  logic rl_phase;                 // slot carries data right-to-left
  logic act;                      // a slot this chip's rows use
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  logic [RW-1:0] row;
  assign act      = en && slot_v && (int'(slot) < 2 * ROWS);
  assign rl_phase = (int'(slot) < ROWS);
  assign row      = RW'(rl_phase ? int'(slot) : int'(slot) - ROWS);

  always_comb begin
    io_left_oe  = act && rl_phase  && !chip_left_edge;
    io_right_oe = act && !rl_phase && !chip_right_edge;
    io_left_o   = io_left_oe  ? left_tx[row]  : '0;
    io_right_o  = io_right_oe ? right_tx[row] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        left_rx[r]  <= '0;
        right_rx[r] <= '0;
      end
    end else if (act) begin
      if (rl_phase && !chip_right_edge) right_rx[row] <= io_right_i;
      if (!rl_phase && !chip_left_edge) left_rx[row]  <= io_left_i;
    end
  end

  initial assert (ROWS >= 1 && ROWS <= 2)
    else $error("castle_edge_io: four slots serve at most two rows");

endmodule
