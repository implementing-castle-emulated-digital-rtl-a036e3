// castle_pe: one CASTLE processor element (12-bit mode).
//
// A processor owns a strip of M=40 cells of every state line and performs one
// forward-Euler iteration step on it:
//     y(i,j) = limit( sum_{3x3} T(i,j)[k,l] * x(i+k,j+l) + c(i,j) )
// where T(i,j) is the template unit chosen by the cell's template-select
// address and c(i,j) its additive variable. The same datapath computes both
// Euler phases: phase 1 (g = B1*u + h*z, lim = LIM_SAT) and phase 2
// (x(n+1) = A1*x(n) + g, lim = LIM_FSR).
//
// Line period: the array runs in line periods that end with a one-cycle
// line_shift. During a period the processor
//   * receives the next line serially on IBUS1..3 (ib_valid strobes, exactly
//     M cells, first cell first) into a0 and the side input lines;
//   * computes the line held in a2 (a3 above it, a1 below it), issuing three
//     ALU operations per cell (template rows 0, 1, 2) on 3*M consecutive
//     cycles right after line_shift. Cells are taken in groups of four that
//     are interleaved, because the ALU feeds a partial sum back to itself
//     four cycles later: issue t handles cell 4*(t/12) + t%4 + 1, template
//     row (t%12)/4;
//   * sends the results out on OBUS1, cell 1 first, one per cycle in bursts
//     of four, each together with the cell's unchanged template address
//     (OBUS2) and additive (OBUS3). The first result leaves 12 cycles after
//     line_shift + 1, the last 3*M+4 cycles after it, so a line period must
//     be at least 3*M+5 cycles.
// A line that did not arrive complete is marked invalid and produces no
// output, so an array fills and drains cleanly.
//
// Bypass: with bypass high the processor still runs its schedule but sends
// each cell's own state on OBUS1 instead of the ALU result, at the same
// time. A row of bypassed processors thus passes lines on one step later
// unchanged, which lets a multi-row array perform a single step (phase 1
// of the Euler scheme is computed once, its result g then serves as the
// additive of every phase-2 step).
//
// Boundaries: front / last say that the line in a2 is the first / last line
// of the frame; the processor then reads its own line in place of the upper
// / lower neighbour (zero-flux boundary). Left and right boundaries are
// handled in register array A (bnd_left / bnd_right).
//
// The structure (register array A, template units, template-select and C
// lines, 4-level ALU with three multipliers, passing on of addresses and
// additives) follows the CASTLE processor element. The issue order, the
// line-period protocol, the boundary rule and the bypass are this design's
// choices.
// Only the 12-bit mode is built; the 6-bit and the 1-bit logic modes are not.
module castle_pe
  import castle_pkg::*;
#(
  parameter int unsigned M = CELLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  // serial line input
  input  logic        ib_valid,
  input  state_t      ib1,        // IBUS1 state / input value
  input  tsel_t       ib2,        // IBUS2 template-select address
  input  state_t      ib3,        // IBUS3 additive variable
  // control
  input  logic        line_shift,
  input  logic        front,
  input  logic        last,
  input  lim_mode_e   lim,
  input  logic        bypass,     // pass the line on without computing
  // horizontal neighbours
  input  logic        bnd_left,
  input  logic        bnd_right,
  input  state_t      left_in,
  input  state_t      right_in,
  output state_t      a0_first,
  output state_t      a0_last,
  // template load
  input  logic        t_we,
  input  tsel_t       t_waddr,
  input  logic [3:0]  t_widx,
  input  coef_t       t_wdata,
  // serial line output
  output logic        ob_valid,
  output state_t      ob1,
  output tsel_t       ob2,
  output state_t      ob3
);

  localparam int unsigned CW = $clog2(M + 2);
  localparam int unsigned NG = M / 4;

  // ---------------- line bookkeeping ----------------
  logic [CW-1:0] rx_cnt;     // cells received into a0 this period
  logic          lv1, lv2;   // a1 / a2 hold a complete line

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt <= '0; lv1 <= 1'b0; lv2 <= 1'b0;
    end else if (en) begin
      if (line_shift) begin
        rx_cnt <= '0;
        lv1    <= (rx_cnt == CW'(M));
        lv2    <= lv1;
      end else if (ib_valid && rx_cnt != CW'(M)) begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end

  // ---------------- issue sequencer ----------------
  logic                   active;
  logic [1:0]             c_cnt;   // cell within group
  logic [1:0]             p_cnt;   // template row
  logic [$clog2(NG+1)-1:0] g_cnt;  // group

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; c_cnt <= '0; p_cnt <= '0; g_cnt <= '0;
    end else if (en) begin
      if (line_shift) begin
        active <= 1'b1;
        c_cnt <= '0; p_cnt <= '0; g_cnt <= '0;
      end else if (active) begin
        c_cnt <= c_cnt + 1'b1;
        if (c_cnt == 2'd3) begin
          if (p_cnt == 2'd2) begin
            p_cnt <= '0;
            if (g_cnt == ($bits(g_cnt))'(NG - 1)) begin
              g_cnt  <= '0;
              active <= 1'b0;
            end else begin
              g_cnt <= g_cnt + 1'b1;
            end
          end else begin
            p_cnt <= p_cnt + 1'b1;
          end
        end
      end
    end
  end

  logic [CW-1:0] col;
  nrow_e         trow, lrow;
  assign col  = CW'(4 * int'(g_cnt) + int'(c_cnt) + 1);
  assign trow = nrow_e'(p_cnt);
  always_comb begin
    lrow = trow;
    if (trow == ROW_UP   && front) lrow = ROW_MID;
    if (trow == ROW_DOWN && last)  lrow = ROW_MID;
  end

  // ---------------- storage ----------------
  state_t v [3];
  coef_t  b [3];
  tsel_t  cur_tsel;
  state_t cur_add;

  castle_reg_array #(.M(M)) u_regs (
    .clk, .rst_n, .en,
    .in_valid (ib_valid),
    .in_data  (ib1),
    .line_shift,
    .bnd_left, .bnd_right, .left_in, .right_in,
    .a0_first, .a0_last,
    .rrow (lrow),
    .rcol (col),
    .v
  );

  castle_aux_lines #(.M(M)) u_aux (
    .clk, .rst_n, .en,
    .in_valid (ib_valid),
    .in_tsel  (ib2),
    .in_add   (ib3),
    .line_shift,
    .rcol (col),
    .tsel (cur_tsel),
    .add  (cur_add)
  );

  castle_template_mem u_tmpl (
    .clk, .rst_n,
    .we (t_we), .waddr (t_waddr), .widx (t_widx), .wdata (t_wdata),
    .raddr (cur_tsel),
    .rrow  (trow),
    .b
  );

  // ---------------- arithmetic ----------------
  logic   issue;
  logic   y_valid;
  state_t y;
  assign issue = active & lv2;

  castle_alu u_alu (
    .clk, .rst_n, .en,
    .in_valid (issue),
    .in_first (trow == ROW_UP),
    .in_last  (trow == ROW_DOWN),
    .in_lim   (lim),
    .a1 (v[0]), .a2 (v[1]), .a3 (v[2]),
    .b1 (b[0]), .b2 (b[1]), .b3 (b[2]),
    .cval (cur_add),
    .y_valid,
    .y
  );

  // side streams travel PIPE cycles alongside the ALU; the cell's own
  // state, read on its middle-row issue (four cycles before its last one),
  // travels PIPE+4 cycles for the bypass
  tsel_t  d_tsel [PIPE];
  state_t d_add  [PIPE];
  state_t d_x    [PIPE+4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PIPE; k++) begin d_tsel[k] <= '0; d_add[k] <= '0; end
      for (int k = 0; k < PIPE + 4; k++) d_x[k] <= '0;
    end else if (en) begin
      d_tsel[0] <= cur_tsel;
      d_add[0]  <= cur_add;
      d_x[0]    <= v[1];
      for (int k = 1; k < PIPE; k++) begin
        d_tsel[k] <= d_tsel[k-1];
        d_add[k]  <= d_add[k-1];
      end
      for (int k = 1; k < PIPE + 4; k++) d_x[k] <= d_x[k-1];
    end
  end

  assign ob_valid = y_valid;
  assign ob1      = bypass ? d_x[PIPE+3] : y;
  assign ob2      = d_tsel[PIPE-1];
  assign ob3      = d_add[PIPE-1];

  // the interleaved schedule needs whole groups of four cells
  initial assert (M % 4 == 0 && M >= 4)
    else $error("castle_pe: M must be a positive multiple of 4");

endmodule
