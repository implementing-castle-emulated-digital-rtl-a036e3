// tb_castle_pe: self-checking test of one CASTLE processor element.
//
// A processor with M=8 cells runs two frames of H=5 lines each. Sixteen
// random templates are loaded through the template port; every cell gets a
// random template address and additive value. Frame A runs in LIM_FSR mode
// with the processor at both array edges (zero-flux boundary built from its
// own lines); frame B runs in LIM_SAT mode with random neighbour cells on
// left_in / right_in. The expected result of every cell is computed here
// from the definition of one Euler step on the whole frame, with top and
// bottom boundary lines replicated. The test also checks that
//   * the line sent in period P comes out in period P+2, in cell order,
//     with its template address and additive passed on unchanged;
//   * an incomplete line (period with fewer than M cells) produces nothing;
//   * front, last, clipping and saturation all occur.
// A third frame runs with bypass high: every cell must come out unchanged,
// at the same time and with the same side values as a computed one.
module tb_castle_pe;
  import castle_pkg::*;

  localparam int M = 8;
  localparam int L = 3 * M + 10;
  localparam int H = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       en = 1'b1;
  logic       ib_valid, line_shift, front, last, bnd_left, bnd_right, bypass;
  state_t     ib1, ib3, left_in, right_in, a0_first, a0_last, ob1, ob3;
  tsel_t      ib2, ob2;
  lim_mode_e  lim;
  logic       t_we;
  tsel_t      t_waddr;
  logic [3:0] t_widx;
  coef_t      t_wdata;
  logic       ob_valid;

  castle_pe #(.M(M)) dut (.*);

  int checks = 0, failures = 0;
  int n_front = 0, n_last = 0, n_clip = 0, n_sat = 0, n_pass = 0, n_bypass = 0;

  coef_t  tmpl [16][9];
  state_t img  [H][M+2];     // columns 0 and M+1: neighbour cells
  tsel_t  tsl  [H][M];
  state_t add  [H][M];

  typedef struct {
    state_t y;
    tsel_t  t;
    state_t a;
    int     period;
  } exp_t;
  exp_t q[$];
  int cur_period = 0;

  function automatic state_t ref_cell(int i, int j, lim_mode_e m);
    longint s, sh;
    int rr;
    s = longint'(add[i][j-1]) <<< TFRAC;
    for (int r = 0; r < 3; r++) begin
      rr = i - 1 + r;
      if (rr < 0) rr = 0;
      if (rr > H - 1) rr = H - 1;
      for (int c = 0; c < 3; c++)
        s += longint'(tmpl[tsl[i][j-1]][3*r+c]) * longint'(img[rr][j-1+c]);
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

  // output checker
  always @(posedge clk) begin
    if (ob_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %0d in period %0d", ob1, cur_period);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (ob1 !== e.y || ob2 !== e.t || ob3 !== e.a || cur_period != e.period) begin
          failures++;
          $display("FAIL: got y=%0d t=%0d a=%0d period %0d, expected y=%0d t=%0d a=%0d period %0d",
                   ob1, ob2, ob3, cur_period, e.y, e.t, e.a, e.period);
        end
        if (lim == LIM_FSR && (e.y == 1024 || e.y == -1024)) n_clip++;
        if (lim == LIM_SAT && (e.y == 2047 || e.y == -2048)) n_sat++;
        n_pass++;
        if (bypass) n_bypass++;
      end
    end
  end

  task automatic make_frame(bit edges_own);
    for (int i = 0; i < H; i++) begin
      for (int j = 1; j <= M; j++) begin
        img[i][j]   = state_t'(int'($urandom_range(0, 2048)) - 1024);
        tsl[i][j-1] = tsel_t'($urandom_range(0, 15));
        add[i][j-1] = state_t'(int'($urandom_range(0, 1024)) - 512);
      end
      if (edges_own) begin
        img[i][0] = img[i][1];
        img[i][M+1] = img[i][M];
      end else begin
        img[i][0]   = state_t'(int'($urandom_range(0, 2048)) - 1024);
        img[i][M+1] = state_t'(int'($urandom_range(0, 2048)) - 1024);
      end
    end
  endtask

  // Runs the frame currently in img/tsl/add: H line periods of input, two
  // extra periods to drain. A short line is sent in the first drain period.
  task automatic run_frame(lim_mode_e m, bit edges_own, bit byp);
    int base;
    base = cur_period;
    lim = m;
    bypass = byp;
    bnd_left = edges_own; bnd_right = edges_own;
    for (int i = 0; i < H; i++)
      for (int j = 1; j <= M; j++)
        q.push_back('{y: byp ? img[i][j] : ref_cell(i, j, m), t: tsl[i][j-1], a: add[i][j-1],
                      period: base + i + 2});
    for (int p = 0; p < H + 2; p++) begin
      for (int cy = 0; cy < L; cy++) begin
        @(negedge clk);
        ib_valid   = 1'b0;
        line_shift = (cy == L - 1);
        front      = (p == 2);
        last       = (p == H + 1);
        if (p < H) begin
          left_in  = img[p][0];
          right_in = img[p][M+1];
          if (cy >= 1 && cy <= M) begin
            ib_valid = 1'b1;
            ib1 = img[p][cy]; ib2 = tsl[p][cy-1]; ib3 = add[p][cy-1];
          end
        end else if (p == H && cy >= 1 && cy <= M - 3) begin
          // incomplete line: must be discarded
          ib_valid = 1'b1;
          ib1 = 16; ib2 = 0; ib3 = 0;
        end
        if (front && cy == 0) n_front++;
        if (last && cy == 0) n_last++;
        if (cy == L - 1) cur_period = cur_period + 1;
      end
    end
  endtask

  initial begin
    ib_valid = 0; line_shift = 0; front = 0; last = 0; bnd_left = 1; bnd_right = 1;
    bypass = 0;
    ib1 = 0; ib2 = 0; ib3 = 0; left_in = 0; right_in = 0; lim = LIM_FSR;
    t_we = 0; t_waddr = 0; t_widx = 0; t_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load templates
    for (int u = 0; u < 16; u++)
      for (int k = 0; k < 9; k++) begin
        tmpl[u][k] = coef_t'(int'($urandom_range(0, 800)) - 400);
        @(negedge clk);
        t_we = 1; t_waddr = tsel_t'(u); t_widx = 4'(k); t_wdata = tmpl[u][k];
      end
    @(negedge clk);
    t_we = 0;
    make_frame(1'b1);
    run_frame(LIM_FSR, 1'b1, 1'b0);
    make_frame(1'b0);
    run_frame(LIM_SAT, 1'b0, 1'b0);
    make_frame(1'b0);
    run_frame(LIM_FSR, 1'b0, 1'b1);
    repeat (2 * L) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    checks++;
    if (n_front == 0 || n_last == 0 || n_clip == 0 || n_sat == 0 || n_bypass == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised");
    end
    $display("cells=%0d front=%0d last=%0d clipped=%0d saturated=%0d bypassed=%0d",
             n_pass, n_front, n_last, n_clip, n_sat, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * L) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
