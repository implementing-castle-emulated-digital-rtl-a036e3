// tb_castle_chip: end-to-end test of the CASTLE array at full size.
//
// Two castle_chip instances with default parameters (2x3 processors, 40
// cells each) are cascaded side by side through their I/O_RIGHT / I/O_LEFT
// buses, giving a 240-cell-wide strip. Two frames of H=6 lines run through
// them: frame A in LIM_FSR mode (state update x(n+1) = A1*x(n) + g), frame B
// in LIM_SAT mode (g = B1*u + h*z); the limiter mode switches between them.
// Each chip row performs one Euler step, so a frame leaves the chips after
// two steps. Sixteen random templates are loaded into every processor; each
// cell has a random template address and additive value.
//
// The expected output is computed here from the definition: two Euler steps
// on the whole 6x240 frame with a zero-flux boundary on all four sides. The
// test checks every output cell (value, address and additive passed on), that
// line i of a frame leaves in period P+i+4 where P is the frame's first input
// period, and that frendout marks the period of a frame's first output line.
// It counts, and requires at least once, each mechanism: front and last line
// boundaries, left and right array boundaries, I/O bus transfers in both
// directions, a HALT in mid-frame, clipping to +-1 and saturation, the
// limiter mode switch and frendout. Bus contention is a failure.
module tb_castle_chip;
  import castle_pkg::*;

  localparam int NCH  = 2;
  localparam int COLS = 3;
  localparam int M    = CELLS;
  localparam int W    = NCH * COLS * M;
  localparam int H    = 6;
  localparam int L    = 3 * M + 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, halt, frendin, lastline;
  lim_mode_e  lim;
  logic       t_we;
  tsel_t      t_waddr;
  logic [3:0] t_widx;
  coef_t      t_wdata;
  logic       ib_valid;
  state_t     ib1 [NCH][COLS];
  tsel_t      ib2 [NCH][COLS];
  state_t     ib3 [NCH][COLS];

  logic       running [NCH], line_shift [NCH], frendout [NCH], ob_valid [NCH];
  logic [$clog2(L)-1:0] cyc [NCH];
  state_t     ob1 [NCH][COLS];
  tsel_t      ob2 [NCH][COLS];
  state_t     ob3 [NCH][COLS];
  state_t     il_o [NCH], il_i [NCH], ir_o [NCH], ir_i [NCH];
  logic       il_oe [NCH], ir_oe [NCH];

  // bus between chip 0 (I/O_RIGHT) and chip 1 (I/O_LEFT)
  state_t bus;
  assign bus     = ir_oe[0] ? ir_o[0] : (il_oe[1] ? il_o[1] : '0);
  assign ir_i[0] = bus;
  assign il_i[1] = bus;
  assign il_i[0] = '0;
  assign ir_i[1] = '0;

  for (genvar k = 0; k < NCH; k++) begin : g_chip
    castle_chip u_chip (
      .clk, .rst_n, .start, .halt, .lim,
      .chip_left_edge  (k == 0),
      .chip_right_edge (k == NCH - 1),
      .col_right_edge  ('0),
      .row_bypass      ('0),
      .running (running[k]), .line_shift (line_shift[k]), .cyc (cyc[k]),
      .frendin, .lastline, .frendout (frendout[k]),
      .t_we, .t_waddr, .t_widx, .t_wdata,
      .ib_valid, .ib1 (ib1[k]), .ib2 (ib2[k]), .ib3 (ib3[k]),
      .ob_valid (ob_valid[k]), .ob1 (ob1[k]), .ob2 (ob2[k]), .ob3 (ob3[k]),
      .io_left_o (il_o[k]), .io_left_oe (il_oe[k]), .io_left_i (il_i[k]),
      .io_right_o (ir_o[k]), .io_right_oe (ir_oe[k]), .io_right_i (ir_i[k])
    );
  end

  int checks = 0, failures = 0;
  int n_front = 0, n_last = 0, n_lbnd = 0, n_rbnd = 0, n_io_rl = 0, n_io_lr = 0;
  int n_halt = 0, n_clip = 0, n_sat = 0, n_switch = 0, n_frendout = 0, n_cells = 0;

  coef_t  tmpl [16][9];
  state_t x0 [H][W];
  tsel_t  tsl [H][W];
  state_t add [H][W];
  state_t x1 [H][W];
  state_t x2 [H][W];

  function automatic state_t step_cell(int i, int j, lim_mode_e m, bit second);
    longint s, sh;
    int rr, cc;
    s = longint'(add[i][j]) <<< TFRAC;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        rr = i - 1 + r; cc = j - 1 + c;
        if (rr < 0) rr = 0;
        if (rr > H - 1) rr = H - 1;
        if (cc < 0) cc = 0;
        if (cc > W - 1) cc = W - 1;
        s += longint'(tmpl[tsl[i][j]][3*r+c]) * longint'(second ? x1[rr][cc] : x0[rr][cc]);
      end
    sh = s >>> TFRAC;
    if (m == LIM_FSR) begin
      if (sh > 1024) sh = 1024;
      if (sh < -1024) sh = -1024;
    end else begin
      if (sh > 2047) sh = 2047;
      if (sh < -2048) sh = -2048;
    end
    return state_t'(sh);
  endfunction

  // ---------------- period counting and output checking ----------------
  int period = 0;         // periods completed since start
  int frame_p0 = 0;       // first input period of the frame in flight
  lim_mode_e frame_lim;
  int ocnt [NCH][COLS];   // cells received per output stream in this frame

  always @(posedge clk) begin
    if (rst_n) begin
      if (halt && running[0]) n_halt++;
      if (ir_oe[0] && il_oe[1]) begin
        checks++; failures++;
        $display("FAIL: contention on the bus between the chips");
      end
      if (ir_oe[0]) n_io_lr++;
      if (il_oe[1]) n_io_rl++;
      for (int k = 0; k < NCH; k++) begin
        if (ob_valid[k]) begin
          for (int c = 0; c < COLS; c++) begin
            int li, j;
            state_t e;
            li = ocnt[k][c] / M;
            j  = k * COLS * M + c * M + ocnt[k][c] % M;
            checks++;
            if (li >= H) begin
              failures++;
              $display("FAIL: chip %0d column %0d: more output than expected", k, c);
            end else begin
              e = x2[li][j];
              if (ob1[k][c] !== e || ob2[k][c] !== tsl[li][j] || ob3[k][c] !== add[li][j]
                  || period != frame_p0 + li + 4) begin
                failures++;
                $display("FAIL: line %0d cell %0d: y=%0d t=%0d a=%0d period %0d, expected y=%0d t=%0d a=%0d period %0d",
                         li, j, ob1[k][c], ob2[k][c], ob3[k][c], period,
                         e, tsl[li][j], add[li][j], frame_p0 + li + 4);
              end
              if (li == 0 && ocnt[k][c] == 0) begin
                checks++;
                if (!frendout[k]) begin
                  failures++;
                  $display("FAIL: frendout low with the first output line");
                end else n_frendout++;
              end
              if (li == 0 || li == H - 1) begin
                if (li == 0) n_front++; else n_last++;
              end
              if (j == 0) n_lbnd++;
              if (j == W - 1) n_rbnd++;
              if (frame_lim == LIM_FSR && (e == 1024 || e == -1024)) n_clip++;
              if (frame_lim == LIM_SAT && (e == 2047 || e == -2048)) n_sat++;
              n_cells++;
            end
            ocnt[k][c]++;
          end
        end
      end
      if (line_shift[0]) period <= period + 1;
    end
  end

  // ---------------- stimulus ----------------
  task automatic new_frame(lim_mode_e m);
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        x0[i][j]  = state_t'(int'($urandom_range(0, 2048)) - 1024);
        tsl[i][j] = tsel_t'($urandom_range(0, 15));
        add[i][j] = state_t'(int'($urandom_range(0, 1024)) - 512);
      end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) x1[i][j] = step_cell(i, j, m, 1'b0);
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) x2[i][j] = step_cell(i, j, m, 1'b1);
  endtask

  // Sends the frame in x0/tsl/add, starting in the current period, then
  // sends nothing for the periods it takes the frame to drain.
  task automatic run_frame(lim_mode_e m, bit do_halt);
    int p0;
    lim = m;
    p0 = period;
    frame_p0 = p0;
    frame_lim = m;
    for (int k = 0; k < NCH; k++)
      for (int c = 0; c < COLS; c++) ocnt[k][c] = 0;
    while (period < p0 + H + 4) begin
      int li;
      @(negedge clk);
      li = period - p0;
      halt = do_halt && (li == 2) && (cyc[0] == 20) && (n_halt < 37);
      ib_valid = 1'b0;
      frendin  = (li == 0);
      lastline = (li == H - 1);
      if (!halt && li < H && cyc[0] >= 1 && cyc[0] <= M) begin
        ib_valid = 1'b1;
        for (int k = 0; k < NCH; k++)
          for (int c = 0; c < COLS; c++) begin
            int j;
            j = k * COLS * M + c * M + int'(cyc[0]) - 1;
            ib1[k][c] = x0[li][j];
            ib2[k][c] = tsl[li][j];
            ib3[k][c] = add[li][j];
          end
      end
    end
    halt = 1'b0;
    for (int k = 0; k < NCH; k++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (ocnt[k][c] != H * M) begin
          failures++;
          $display("FAIL: chip %0d column %0d gave %0d cells, expected %0d", k, c,
                   ocnt[k][c], H * M);
        end
      end
  endtask

  initial begin
    start = 0; halt = 0; frendin = 0; lastline = 0; lim = LIM_FSR; ib_valid = 0;
    t_we = 0; t_waddr = 0; t_widx = 0; t_wdata = 0;
    for (int k = 0; k < NCH; k++)
      for (int c = 0; c < COLS; c++) begin
        ib1[k][c] = 0; ib2[k][c] = 0; ib3[k][c] = 0; ocnt[k][c] = 0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 16; u++)
      for (int k = 0; k < 9; k++) begin
        tmpl[u][k] = coef_t'(int'($urandom_range(0, 700)) - 350);
        @(negedge clk);
        t_we = 1; t_waddr = tsel_t'(u); t_widx = 4'(k); t_wdata = tmpl[u][k];
      end
    @(negedge clk);
    t_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    new_frame(LIM_FSR);
    run_frame(LIM_FSR, 1'b1);
    n_switch++;
    new_frame(LIM_SAT);
    run_frame(LIM_SAT, 1'b0);

    checks++;
    if (n_front == 0 || n_last == 0 || n_lbnd == 0 || n_rbnd == 0 || n_io_rl == 0 ||
        n_io_lr == 0 || n_halt == 0 || n_clip == 0 || n_sat == 0 || n_switch == 0 ||
        n_frendout == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("cells=%0d front=%0d last=%0d left_bnd=%0d right_bnd=%0d io_rl=%0d io_lr=%0d halt=%0d clip=%0d sat=%0d switch=%0d frendout=%0d",
             n_cells, n_front, n_last, n_lbnd, n_rbnd, n_io_rl, n_io_lr, n_halt, n_clip,
             n_sat, n_switch, n_frendout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * L + 400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
