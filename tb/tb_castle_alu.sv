// tb_castle_alu: self-checking test of the 4-level pipeline arithmetic unit.
//
// Issues groups of four interleaved cells, three issues per cell (first,
// middle, last), with random states, coefficients and additive values, and
// with large values that drive the limiter into both bounds in both limiter
// modes. The expected result of every cell is worked out here from the
// definition y = clamp(floor((sum a*b + c*2^TFRAC) / 2^TFRAC)); each result
// must appear exactly four cycles after the cell's last issue, and no other
// output may be flagged valid. Random idle cycles separate the groups.
module tb_castle_alu;
  import castle_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b1;
  always #5 clk = ~clk;

  logic      in_valid, in_first, in_last;
  lim_mode_e in_lim;
  state_t    a1, a2, a3, cval;
  coef_t     b1, b2, b3;
  logic      y_valid;
  state_t    y;

  castle_alu dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, indexed by the cycle they must appear in
  state_t exp_y [int];
  int sat_hi = 0, sat_lo = 0;

  function automatic state_t ref_limit(longint s, lim_mode_e m);
    longint sh, hi, lo;
    sh = s >>> TFRAC;
    hi = (m == LIM_FSR) ? 1024 : 2047;
    lo = (m == LIM_FSR) ? -1024 : -2048;
    if (sh > hi) return state_t'(hi);
    if (sh < lo) return state_t'(lo);
    return state_t'(sh);
  endfunction

  function automatic state_t rnd_state(bit big);
    if (big) return state_t'($urandom_range(0, 1) ? 1024 : -1024);
    return state_t'(int'($urandom_range(0, 2048)) - 1024);
  endfunction

  function automatic coef_t rnd_coef(bit big);
    if (big) return coef_t'($urandom_range(0, 1) ? 2047 : -2048);
    return coef_t'(int'($urandom_range(0, 1024)) - 512);
  endfunction

  always @(posedge clk) begin
    if (rst_n && en) begin
      if (exp_y.exists(int'(cycle))) begin
        checks++;
        if (!y_valid || y !== exp_y[int'(cycle)]) begin
          failures++;
          $display("FAIL cycle %0d: y_valid=%0d y=%0d expected %0d", cycle, y_valid, y,
                   exp_y[int'(cycle)]);
        end
        exp_y.delete(int'(cycle));
      end else if (y_valid) begin
        checks++; failures++;
        $display("FAIL cycle %0d: unexpected y_valid", cycle);
      end
    end
  end

  task automatic run_group(lim_mode_e m, bit big);
    state_t  xa [4][3][3];
    coef_t   xb [4][3][3];
    state_t  xc [4];
    longint  sum;
    for (int c = 0; c < 4; c++) begin
      xc[c] = rnd_state(big);
      for (int p = 0; p < 3; p++)
        for (int k = 0; k < 3; k++) begin
          xa[c][p][k] = rnd_state(big);
          xb[c][p][k] = rnd_coef(big);
        end
    end
    for (int p = 0; p < 3; p++)
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        in_valid = 1'b1; in_first = (p == 0); in_last = (p == 2); in_lim = m;
        a1 = xa[c][p][0]; a2 = xa[c][p][1]; a3 = xa[c][p][2];
        b1 = xb[c][p][0]; b2 = xb[c][p][1]; b3 = xb[c][p][2];
        cval = xc[c];
        if (p == 2) begin
          sum = longint'(xc[c]) <<< TFRAC;
          for (int pp = 0; pp < 3; pp++)
            for (int k = 0; k < 3; k++)
              sum += longint'(xa[c][pp][k]) * longint'(xb[c][pp][k]);
          if ((sum >>> TFRAC) > ((m == LIM_FSR) ? 1024 : 2047)) sat_hi++;
          if ((sum >>> TFRAC) < ((m == LIM_FSR) ? -1024 : -2048)) sat_lo++;
          // the edge that samples this issue is at cycle 'cycle'; y shows 4 later
          exp_y[int'(cycle) + 4] = ref_limit(sum, m);
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_lim = LIM_FSR;
    a1 = 0; a2 = 0; a3 = 0; b1 = 0; b2 = 0; b3 = 0; cval = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 200; g++) begin
      run_group(g % 2 ? LIM_SAT : LIM_FSR, (g % 5) == 4);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    // groups separated by a single idle cycle
    for (int g = 0; g < 20; g++) begin
      run_group(LIM_FSR, 1'b0);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_y.num() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", exp_y.num());
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL: limiter bounds not exercised (hi=%0d lo=%0d)", sat_hi, sat_lo);
    end
    $display("limiter hits: upper=%0d lower=%0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
