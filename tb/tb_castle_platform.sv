// tb_castle_platform: end-to-end test of the CASTLE platform at full size.
//
// The platform with its default parameters (three chips in a row, a
// 360-cell-wide array, four memory units of 9600 entries) is driven only
// through its host register bus, as the DSP would drive it:
//   1. sixteen random templates are loaded; a random frame of H=240 lines
//      is written into memory units 0 (states), 1 (per-cell template
//      addresses) and 2 (additives), lane by lane, which fills each of them
//      to its 9600 entries;
//   2. pass 1 (LIM_FSR, per-cell template addresses from unit 1) streams the
//      frame through the chips into unit 3; HALT is raised for a while in
//      the middle of the pass;
//   3. pass 2 (LIM_SAT, one template address for all cells) streams unit 3
//      back through the chips into unit 0, with the frame narrowed to 8
//      processor columns (320 cells) so that processor column 8 (chip 2,
//      column 1) acts as the right edge of the array;
//   4. pass 3 (LIM_FSR, one step: the lower chip row only passes the lines
//      on) streams unit 0 into unit 3;
//   5. after each pass the destination unit is read out and compared cell
//      by cell with two Euler steps computed here on the whole 240x360 (then
//      240x320, the video frame size) frame with zero-flux boundaries, and
//      units 1 and 2 must again hold their original content (the addresses
//      and additives written back).
// The test counts, and requires at least once: passes, chips started by the
// controller, HALT cycles, transfers on both chip-to-chip buses, per-cell and
// default template addressing, both limiter modes, a narrowed frame, full
// memory units, a one-step pass and the first-line marker leaving the array. The length of
// pass 2 is checked against lines+4 line periods of 3*M+10 cycles.
module tb_castle_platform;
  import castle_pkg::*;

  localparam int NCHIPS = 3;
  localparam int COLS   = 3;
  localparam int M      = CELLS;
  localparam int NL     = NCHIPS * COLS;
  localparam int W      = NL * M;
  localparam int H      = 240;
  localparam int LC     = 3 * M + 10;
  localparam int WN     = (NL - 1) * M;   // narrow frame of pass 2

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        h_we = 1'b0;
  logic [7:0]  h_addr = '0;
  logic [31:0] h_wdata = '0;
  logic [31:0] h_rdata;
  logic        frame_out;

  castle_platform dut (.*);

  int checks = 0, failures = 0;
  int n_pass = 0, n_halt = 0, n_bus01 = 0, n_bus12 = 0, n_frame_out = 0, n_start = 0;
  int n_mem_tsel = 0, n_def_tsel = 0, n_fsr = 0, n_sat = 0, n_narrow = 0, n_full = 0, n_one_step = 0;

  coef_t  tmpl [16][9];
  state_t x0 [H][W];
  tsel_t  tsl [H][W];
  state_t add [H][W];
  state_t xa [H][W];
  state_t xb [H][W];
  state_t xc [H][W];

  // chip-to-chip bus activity and halt, observed inside the platform
  always @(posedge clk) begin
    if (dut.g_chip[0].u_chip.io_right_oe || dut.g_chip[1].u_chip.io_left_oe) n_bus01++;
    if (dut.g_chip[1].u_chip.io_right_oe || dut.g_chip[2].u_chip.io_left_oe) n_bus12++;
    if (dut.c_halt && dut.running[0]) n_halt++;
    if (dut.c_start) n_start++;
    if (frame_out && dut.line_shift[0]) n_frame_out++;
  end

  task automatic hw(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    h_we = 1'b1; h_addr = a; h_wdata = d;
    @(negedge clk);
    h_we = 1'b0;
  endtask

  task automatic hr(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    h_addr = a;
    #1;
    d = h_rdata;
  endtask

  // one Euler step of the frame's first wd columns: dst = F(src)
  task automatic step(ref state_t src [H][W], ref state_t dst [H][W], input lim_mode_e m,
                      input bit per_cell, input tsel_t tdef, input int wd);
    for (int i = 0; i < H; i++)
      for (int j = 0; j < wd; j++) begin
        longint s, sh;
        tsel_t t;
        t = per_cell ? tsl[i][j] : tdef;
        s = longint'(add[i][j]) <<< TFRAC;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int rr, cc;
            rr = i - 1 + r; cc = j - 1 + c;
            if (rr < 0) rr = 0;
            if (rr > H - 1) rr = H - 1;
            if (cc < 0) cc = 0;
            if (cc > wd - 1) cc = wd - 1;
            s += longint'(tmpl[t][3*r+c]) * longint'(src[rr][cc]);
          end
        sh = s >>> TFRAC;
        if (m == LIM_FSR) begin
          if (sh > 1024) sh = 1024;
          if (sh < -1024) sh = -1024;
        end else begin
          if (sh > 2047) sh = 2047;
          if (sh < -2048) sh = -2048;
        end
        dst[i][j] = state_t'(sh);
      end
  endtask

  // lane l of entry (i, p) is cell l*M + p of line i
  task automatic load_unit(int unit, int what);
    for (int i = 0; i < H; i++)
      for (int p = 0; p < M; p++) begin
        for (int l = 0; l < NL; l++) begin
          int j;
          j = l * M + p;
          hw(HA_LANE + 8'(l), (what == 0) ? 32'(x0[i][j]) :
                              (what == 1) ? 32'(tsl[i][j]) : 32'(add[i][j]));
        end
        hw(HA_PUSH, 32'(unit));
      end
  endtask

  // reads a unit entry by entry (pop after reading) and compares it; what:
  // 0 = states against ref, 1 = template addresses, 2 = additives. The unit
  // is refilled with what was read so that it keeps its content.
  task automatic check_unit(int unit, int what, ref state_t refx [H][W], input string name,
                            input int wd = W);
    logic [31:0] d;
    int bad;
    bad = 0;
    hr(HA_COUNT + 8'(unit), d);
    checks++;
    if (d != 32'(H * M)) begin
      failures++;
      $display("FAIL: unit %0d holds %0d entries, expected %0d", unit, d, H * M);
    end
    hw(HA_RDSEL, 32'(unit));
    for (int i = 0; i < H; i++)
      for (int p = 0; p < M; p++) begin
        for (int l = 0; l < NL; l++) begin
          int j;
          state_t e;
          j = l * M + p;
          e = (what == 0) ? refx[i][j] : (what == 1) ? state_t'(tsl[i][j]) : add[i][j];
          hr(HA_LANE + 8'(l), d);
          if (what == 0 && j >= wd) e = d[DW-1:0];   // beyond the frame: not used
          else checks++;
          if (d[DW-1:0] !== e) begin
            failures++;
            if (bad++ < 10)
              $display("FAIL %s: line %0d cell %0d = %0d expected %0d", name, i, j,
                       $signed(d[DW-1:0]), e);
          end
          hw(HA_LANE + 8'(l), d);
        end
        hw(HA_POP, 0);
        hw(HA_PUSH, 32'(unit));
      end
  endtask

  task automatic wait_idle();
    logic [31:0] d;
    do hr(HA_STATUS, d); while (d[0]);
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    int t0;
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 16; u++)
      for (int k = 0; k < 9; k++) begin
        tmpl[u][k] = coef_t'(int'($urandom_range(0, 700)) - 350);
        hw(HA_TLOAD, {12'd0, 4'(u), 4'(k), 12'(tmpl[u][k])});
      end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        x0[i][j]  = state_t'(int'($urandom_range(0, 2048)) - 1024);
        tsl[i][j] = tsel_t'($urandom_range(0, 15));
        add[i][j] = state_t'(int'($urandom_range(0, 1024)) - 512);
      end
    load_unit(0, 0);
    load_unit(1, 1);
    load_unit(2, 2);
    hr(HA_STATUS, d);
    checks++;
    if (d[6:4] != 3'b111 || d[7]) begin
      failures++;
      $display("FAIL: status %h after filling units 0..2", d);
    end else n_full++;

    // pass 1: FSR, per-cell template addresses, unit 0 -> unit 3
    step(x0, xa, LIM_FSR, 1'b1, 0, W);
    step(xa, xb, LIM_FSR, 1'b1, 0, W);
    hw(HA_LINES, H);
    hw(HA_ROUTE, {24'd0, 2'd3, 2'd2, 2'd1, 2'd0});
    hw(HA_CTRL, 32'b0111);
    n_mem_tsel++; n_fsr++;
    // HALT for a while once the frame is streaming
    repeat (3 * (3 * M + 10)) @(negedge clk);
    hw(HA_CTRL, 32'b1110);
    repeat (50) @(negedge clk);
    hw(HA_CTRL, 32'b0110);
    wait_idle();
    n_pass++;
    check_unit(3, 0, xb, "pass 1 result");
    check_unit(1, 1, xb, "template addresses");
    check_unit(2, 2, xb, "additives");

    // pass 2: SAT, one template address for all cells, a frame of 8
    // processor columns (320 cells), unit 3 -> unit 0; unit 0 was emptied by
    // pass 1
    hw(HA_TDEF, 7);
    hw(HA_WIDTH, NL - 1);
    hr(HA_WIDTH, d);
    checks++;
    if (d != 32'(NL - 1)) begin
      failures++;
      $display("FAIL: HA_WIDTH reads %0d", d);
    end
    step(xb, xc, LIM_SAT, 1'b0, 7, WN);
    step(xc, xa, LIM_SAT, 1'b0, 7, WN);
    n_narrow++;
    hw(HA_ROUTE, {24'd0, 2'd0, 2'd2, 2'd1, 2'd3});
    hw(HA_CTRL, 32'b0001);
    t0 = cycle;
    n_def_tsel++; n_sat++;
    wait_idle();
    // a pass lasts lines+4 line periods after the first line_shift
    checks++;
    if (cycle - t0 < (H + 4) * LC || cycle - t0 > (H + 5) * LC + 4) begin
      failures++;
      $display("FAIL: pass 2 took %0d cycles, expected %0d..%0d", cycle - t0,
               (H + 4) * LC, (H + 5) * LC + 4);
    end
    n_pass++;
    check_unit(0, 0, xa, "pass 2 result", WN);
    check_unit(2, 2, xa, "additives");

    // pass 3: one step only (lower chip row passes lines on), FSR, unit 0 ->
    // unit 3, which pass 2 emptied
    step(xa, xc, LIM_FSR, 1'b0, 7, WN);
    hw(HA_ROUTE, {24'd0, 2'd3, 2'd2, 2'd1, 2'd0});
    hw(HA_CTRL, 32'b10011);
    n_one_step++;
    wait_idle();
    n_pass++;
    check_unit(3, 0, xc, "pass 3 (one step) result", WN);

    checks++;
    if (n_pass < 3 || n_one_step == 0 || n_start != 1 || n_halt == 0 || n_bus01 == 0 || n_bus12 == 0 ||
        n_frame_out < 2 || n_mem_tsel == 0 || n_def_tsel == 0 || n_fsr == 0 || n_sat == 0 ||
        n_narrow == 0 || n_full == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("passes=%0d starts=%0d halt=%0d bus01=%0d bus12=%0d frame_out=%0d",
             n_pass, n_start, n_halt, n_bus01, n_bus12, n_frame_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
