// tb_castle_template_mem: self-checking test of the 16 template units.
//
// Checks that all units read zero after reset, then writes random
// coefficients into every unit (in random order, with repeated overwrites),
// keeps a copy here and reads every unit and template row back, comparing
// the three coefficients of the row. Writes with an index above 8 must be
// ignored.
module tb_castle_template_mem;
  import castle_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  tsel_t      waddr, raddr;
  logic [3:0] widx;
  coef_t      wdata;
  nrow_e      rrow;
  coef_t      b [3];

  castle_template_mem dut (.*);

  int checks = 0, failures = 0;
  coef_t model [16][9];

  task automatic check_all();
    for (int u = 0; u < 16; u++)
      for (int r = 0; r < 3; r++) begin
        raddr = tsel_t'(u);
        rrow  = nrow_e'(r);
        #1;
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (b[c] !== model[u][3*r+c]) begin
            failures++;
            $display("FAIL unit %0d row %0d col %0d: %0d expected %0d", u, r, c, b[c],
                     model[u][3*r+c]);
          end
        end
      end
  endtask

  initial begin
    we = 0; waddr = 0; widx = 0; wdata = 0; raddr = 0; rrow = ROW_UP;
    for (int u = 0; u < 16; u++) for (int k = 0; k < 9; k++) model[u][k] = '0;
    #12 rst_n = 1'b1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = tsel_t'($urandom_range(0, 15));
      widx  = 4'($urandom_range(0, 10));
      wdata = coef_t'($urandom);
      if (widx < 9) model[waddr][widx] = wdata;
    end
    for (int u = 0; u < 16; u++)
      for (int k = 0; k < 9; k++) begin
        @(negedge clk);
        waddr = tsel_t'(u); widx = 4'(k); wdata = coef_t'($urandom);
        model[u][k] = wdata;
      end
    @(negedge clk);
    we = 1'b0;
    check_all();
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
