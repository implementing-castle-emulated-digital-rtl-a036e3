// tb_castle_aux_lines: self-checking test of the template-select and C
// register lines.
//
// With M=8 cells, random (address, additive) lines are shifted in serially
// and moved on by line_shift. A model keeps the three stages; after every
// line_shift the working line, which must be the line that arrived two
// shifts earlier, is read back cell by cell.
module tb_castle_aux_lines;
  import castle_pkg::*;

  localparam int M = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en, in_valid, line_shift;
  tsel_t  in_tsel, tsel;
  state_t in_add, add;
  logic [$clog2(M+2)-1:0] rcol;

  castle_aux_lines #(.M(M)) dut (.*);

  int checks = 0, failures = 0;
  tsel_t  t0 [1:M], t1 [1:M], t2 [1:M];
  state_t c0 [1:M], c1 [1:M], c2 [1:M];

  task automatic check();
    for (int j = 1; j <= M; j++) begin
      rcol = ($bits(rcol))'(j);
      #1;
      checks++;
      if (tsel !== t2[j] || add !== c2[j]) begin
        failures++;
        $display("FAIL cell %0d: %0d/%0d expected %0d/%0d", j, tsel, add, t2[j], c2[j]);
      end
    end
  endtask

  initial begin
    en = 1; in_valid = 0; line_shift = 0; in_tsel = 0; in_add = 0; rcol = 1;
    for (int j = 1; j <= M; j++) begin
      t0[j] = 0; t1[j] = 0; t2[j] = 0; c0[j] = 0; c1[j] = 0; c2[j] = 0;
    end
    #12 rst_n = 1'b1;
    check();
    for (int line = 0; line < 10; line++) begin
      for (int j = 1; j <= M; j++) begin
        @(negedge clk);
        in_valid = 1; in_tsel = tsel_t'($urandom); in_add = state_t'($urandom);
        for (int q = 1; q < M; q++) begin t0[q] = t0[q+1]; c0[q] = c0[q+1]; end
        t0[M] = in_tsel; c0[M] = in_add;
      end
      @(negedge clk);
      in_valid = 0; line_shift = 1;
      t2 = t1; c2 = c1; t1 = t0; c1 = c0;
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
