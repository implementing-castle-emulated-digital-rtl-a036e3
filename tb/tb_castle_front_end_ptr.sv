// tb_castle_front_end_ptr: self-checking test of the Front-End-Pointer.
//
// Line periods of 5 cycles are generated here. frendin and lastline are
// raised in randomly chosen periods (sometimes in consecutive periods,
// sometimes both at once); the test remembers the periods and expects
// front[r] / last[r] exactly in period P+2+2r for a marker raised in period
// P, and frendout in period P+4 (two rows). A line_shift with en low must be
// ignored.
module tb_castle_front_end_ptr;

  localparam int ROWS = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en, line_shift, frendin, lastline, frendout;
  logic [ROWS-1:0] front, last;

  castle_front_end_ptr #(.ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0, n_front = 0, n_last = 0;
  bit fmark [200], lmark [200];

  initial begin
    en = 1; line_shift = 0; frendin = 0; lastline = 0;
    for (int p = 0; p < 200; p++) begin
      fmark[p] = ($urandom_range(0, 3) == 0);
      lmark[p] = ($urandom_range(0, 3) == 0);
    end
    #12 rst_n = 1'b1;
    for (int p = 0; p < 120; p++) begin
      for (int c = 0; c < 5; c++) begin
        @(negedge clk);
        frendin  = fmark[p];
        lastline = lmark[p];
        line_shift = (c == 4);
        // a shift with en low in the middle of the period is ignored
        en = !(c == 2 && p % 7 == 3);
        if (c == 2 && p % 7 == 3) line_shift = 1;
        for (int r = 0; r < ROWS; r++) begin
          bit ef, el;
          ef = (p >= 2 + 2 * r) && fmark[p - 2 - 2 * r];
          el = (p >= 2 + 2 * r) && lmark[p - 2 - 2 * r];
          checks++;
          if (front[r] !== ef || last[r] !== el) begin
            failures++;
            $display("FAIL period %0d row %0d: front=%0d last=%0d expected %0d %0d",
                     p, r, front[r], last[r], ef, el);
          end
          if (c == 0 && ef) n_front++;
          if (c == 0 && el) n_last++;
        end
        checks++;
        if (frendout !== ((p >= 2 * ROWS) && fmark[p - 2 * ROWS])) begin
          failures++;
          $display("FAIL period %0d: frendout=%0d", p, frendout);
        end
      end
    end
    checks++;
    if (n_front == 0 || n_last == 0) begin
      failures++;
      $display("FAIL: no markers seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
