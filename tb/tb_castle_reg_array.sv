// tb_castle_reg_array: self-checking test of register array A.
//
// With M=8 cells, random lines are shifted serially into a0 and moved down
// by line_shift, with random neighbour cells on left_in / right_in and the
// boundary flags bnd_left / bnd_right toggling from line to line. A model
// here keeps the expected content of a1, a2 and a3 (edge registers
// included); after every line_shift every read position of every line is
// compared, as are a0_first and a0_last. Shifting while en is low must do
// nothing.
module tb_castle_reg_array;
  import castle_pkg::*;

  localparam int M = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en, in_valid, line_shift, bnd_left, bnd_right;
  state_t in_data, left_in, right_in, a0_first, a0_last;
  nrow_e  rrow;
  logic [$clog2(M+2)-1:0] rcol;
  state_t v [3];

  castle_reg_array #(.M(M)) dut (.*);

  int checks = 0, failures = 0;
  state_t m0 [1:M];
  state_t m1 [0:M+1], m2 [0:M+1], m3 [0:M+1];

  task automatic check();
    for (int r = 0; r < 3; r++)
      for (int j = 1; j <= M; j++) begin
        rrow = nrow_e'(r);
        rcol = ($bits(rcol))'(j);
        #1;
        for (int k = 0; k < 3; k++) begin
          state_t e;
          e = (r == 0) ? m3[j-1+k] : (r == 1) ? m2[j-1+k] : m1[j-1+k];
          checks++;
          if (v[k] !== e) begin
            failures++;
            $display("FAIL line %0d col %0d k %0d: %0d expected %0d", r, j, k, v[k], e);
          end
        end
      end
    checks++;
    if (a0_first !== m0[1] || a0_last !== m0[M]) begin
      failures++;
      $display("FAIL a0 ends");
    end
  endtask

  initial begin
    en = 1; in_valid = 0; line_shift = 0; bnd_left = 0; bnd_right = 0;
    in_data = 0; left_in = 0; right_in = 0; rrow = ROW_UP; rcol = 1;
    for (int j = 1; j <= M; j++) m0[j] = 0;
    for (int j = 0; j <= M + 1; j++) begin m1[j] = 0; m2[j] = 0; m3[j] = 0; end
    #12 rst_n = 1'b1;
    check();
    for (int line = 0; line < 12; line++) begin
      for (int j = 1; j <= M; j++) begin
        @(negedge clk);
        in_valid = 1; in_data = state_t'($urandom);
        for (int q = 1; q < M; q++) m0[q] = m0[q+1];
        m0[M] = in_data;
      end
      @(negedge clk);
      in_valid = 0;
      // a shift with en low must be ignored
      if (line == 3) begin
        en = 0; line_shift = 1;
        @(negedge clk);
        en = 1; line_shift = 0;
      end
      check();
      @(negedge clk);
      bnd_left = line[0]; bnd_right = line[1];
      left_in = state_t'($urandom); right_in = state_t'($urandom);
      line_shift = 1;
      m3 = m2; m2 = m1;
      for (int j = 1; j <= M; j++) m1[j] = m0[j];
      m1[0]   = bnd_left  ? m0[1] : left_in;
      m1[M+1] = bnd_right ? m0[M] : right_in;
      @(negedge clk);
      line_shift = 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
