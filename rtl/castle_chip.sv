// castle_chip: the CASTLE processor array chip, 2 rows x 3 columns.
//
// The chip performs ROWS forward-Euler iterations of a cellular neural
// network on a strip COLS*M = 120 cells wide, streaming: state lines enter
// at the top, one per line period, and leave at the bottom ROWS iterations
// later. Column c of processors owns cells c*M+1 .. (c+1)*M of every line;
// row r performs iteration r of the pass. Row 0 takes its lines from the
// input buses IB1/IB2/IB3 of its column, row r+1 from the output buses of
// row r, and the last row drives the chip outputs OB1/OB2/OB3. Template
// addresses (IB2) and additive variables (IB3) travel down unchanged with
// their cells.
//
// Inside the chip, horizontally adjacent processors exchange their edge
// cells directly. The outer edges go through castle_edge_io to the
// time-multiplexed I/O_LEFT / I/O_RIGHT buses when the chip has a neighbour
// chip (chip_left_edge / chip_right_edge low) and are built from the
// processors' own lines otherwise. Any processor column can also be made
// the right edge of the array (col_right_edge[c]), so that a frame narrower
// than the chips, a multiple of M cells wide, gets its right boundary at
// the correct column; processors to the right of it then compute values
// nobody uses. The Front-End-Pointer marks the rows
// that compute the first or last line of a frame; the Timing and Control
// unit provides en, line_shift and the I/O slots.
//
// Host protocol: pulse start once. Each line period lasts LINE_CYCLES
// cycles (line_shift high on its last cycle); during a period the host
// sends one line, exactly M cells per column on ib_valid strobes, before
// cycle LINE_CYCLES-6, raising frendin for the first and lastline for the
// last line of a frame. After the last line of a frame it sends at least
// 2*ROWS empty periods (or the next frame) so that the pipeline drains; the
// result lines appear on ob_valid/ob1..3, column by column in step, the
// first of them in period P+2*ROWS for a first line sent in period P.
// lim selects the Euler phase (LIM_SAT for g = B1*u + h*z, LIM_FSR for the
// state update), row_bypass[r] makes row r pass its lines on unchanged (so
// that a pass can apply a single step, as phase 1 needs), and the template
// port loads all processors at once. Change lim and row_bypass only between
// frames.
//
// The 2x3 arrangement, the two I/O buses, the Front-End-Pointer, the
// Timing and Control unit and edge processors chosen by their position
// follow the CASTLE array; the protocol and the
// timing are this design's choices.
module castle_chip
  import castle_pkg::*;
#(
  parameter int unsigned ROWS        = 2,
  parameter int unsigned COLS        = 3,
  parameter int unsigned M           = CELLS,
  parameter int unsigned LINE_CYCLES = 3 * M + 10
) (
  input  logic        clk,
  input  logic        rst_n,              // RESET
  input  logic        start,              // START
  input  logic        halt,               // HALT
  input  lim_mode_e   lim,
  input  logic [ROWS-1:0] row_bypass,  // row r passes lines on unchanged
  input  logic        chip_left_edge,
  input  logic        chip_right_edge,
  input  logic [COLS-1:0] col_right_edge,
  // status towards the host
  output logic        running,
  output logic        line_shift,
  output logic [$clog2(LINE_CYCLES)-1:0] cyc,
  // Front-End-Pointer pins
  input  logic        frendin,
  input  logic        lastline,
  output logic        frendout,
  // template load, broadcast to every processor
  input  logic        t_we,
  input  tsel_t       t_waddr,
  input  logic [3:0]  t_widx,
  input  coef_t       t_wdata,
  // line input, one set of buses per column (IB1_c1, IB2_c1, IB3_c1, ...)
  input  logic        ib_valid,
  input  state_t      ib1 [COLS],
  input  tsel_t       ib2 [COLS],
  input  state_t      ib3 [COLS],
  // line output of the last row (OB1_c2, OB2_c2, OB3_c2, ...)
  output logic        ob_valid,
  output state_t      ob1 [COLS],
  output tsel_t       ob2 [COLS],
  output state_t      ob3 [COLS],
  // I/O_LEFT and I/O_RIGHT
  output state_t      io_left_o,
  output logic        io_left_oe,
  input  state_t      io_left_i,
  output state_t      io_right_o,
  output logic        io_right_oe,
  input  state_t      io_right_i
);

  logic            en;
  logic            io_slot_v;
  logic [1:0]      io_slot;
  logic [ROWS-1:0] front, last;

  castle_timing_ctrl #(.M(M), .LINE_CYCLES(LINE_CYCLES)) u_tc (
    .clk, .rst_n, .start, .halt,
    .running, .en, .line_shift, .cyc,
    .io_slot_v, .io_slot
  );

  castle_front_end_ptr #(.ROWS(ROWS)) u_fep (
    .clk, .rst_n, .en, .line_shift,
    .frendin, .lastline,
    .front, .last, .frendout
  );

  // processor grid signals
  logic   pv   [ROWS+1][COLS];
  state_t p1   [ROWS+1][COLS];
  tsel_t  p2   [ROWS+1][COLS];
  state_t p3   [ROWS+1][COLS];
  state_t a0f  [ROWS][COLS];
  state_t a0l  [ROWS][COLS];
  state_t lin  [ROWS][COLS];
  state_t rin  [ROWS][COLS];
  state_t left_tx [ROWS], right_tx [ROWS], left_rx [ROWS], right_rx [ROWS];

  for (genvar c = 0; c < COLS; c++) begin : g_in
    assign pv[0][c] = ib_valid;
    assign p1[0][c] = ib1[c];
    assign p2[0][c] = ib2[c];
    assign p3[0][c] = ib3[c];
    assign ob1[c]   = p1[ROWS][c];
    assign ob2[c]   = p2[ROWS][c];
    assign ob3[c]   = p3[ROWS][c];
  end
  assign ob_valid = pv[ROWS][0];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign left_tx[r]  = a0f[r][0];
    assign right_tx[r] = a0l[r][COLS-1];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      if (c == 0) begin : g_l
        assign lin[r][c] = left_rx[r];
      end else begin : g_l
        assign lin[r][c] = a0l[r][c-1];
      end
      if (c == COLS - 1) begin : g_r
        assign rin[r][c] = right_rx[r];
      end else begin : g_r
        assign rin[r][c] = a0f[r][c+1];
      end

      castle_pe #(.M(M)) u_pe (
        .clk, .rst_n, .en,
        .ib_valid (pv[r][c]),
        .ib1 (p1[r][c]), .ib2 (p2[r][c]), .ib3 (p3[r][c]),
        .line_shift,
        .front (front[r]),
        .last  (last[r]),
        .lim,
        .bypass (row_bypass[r]),
        .bnd_left  ((c == 0)        && chip_left_edge),
        .bnd_right (((c == COLS - 1) && chip_right_edge) || col_right_edge[c]),
        .left_in  (lin[r][c]),
        .right_in (rin[r][c]),
        .a0_first (a0f[r][c]),
        .a0_last  (a0l[r][c]),
        .t_we, .t_waddr, .t_widx, .t_wdata,
        .ob_valid (pv[r+1][c]),
        .ob1 (p1[r+1][c]), .ob2 (p2[r+1][c]), .ob3 (p3[r+1][c])
      );
    end
  end

  castle_edge_io #(.ROWS(ROWS)) u_io (
    .clk, .rst_n, .en,
    .chip_left_edge, .chip_right_edge,
    .slot_v (io_slot_v), .slot (io_slot),
    .left_tx, .right_tx, .left_rx, .right_rx,
    .io_left_o, .io_left_oe, .io_left_i,
    .io_right_o, .io_right_oe, .io_right_i
  );

endmodule
