// tb_castle_tmpl_select: self-checking test of the template-select unit.
//
// Checks the two functions of the unit with random stimulus:
//   * a template load presented in one cycle must appear on the chips'
//     template port exactly one cycle later (unit, index, coefficient), and
//     the port must be idle in a cycle after no load;
//   * every IBUS2 lane must carry the low four bits of its memory lane while
//     use_mem is high and the host's default address otherwise, the default
//     changing only on def_we.
// Both address sources and default changes are counted and must occur.
module tb_castle_tmpl_select;
  import castle_pkg::*;

  localparam int unsigned NL = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            load_we = 1'b0, def_we = 1'b0, use_mem = 1'b0;
  logic [19:0]     load_data = '0;
  tsel_t           def_addr = '0;
  state_t [NL-1:0] mem_lanes = '0;
  tsel_t  [NL-1:0] ib2;
  logic            t_we;
  tsel_t           t_waddr;
  logic [3:0]      t_widx;
  coef_t           t_wdata;

  castle_tmpl_select #(.NL(NL)) dut (.*);

  int checks = 0, failures = 0;
  int n_load = 0, n_mem = 0, n_def = 0, n_defchg = 0;
  tsel_t       tdef_m = '0;
  logic        prev_we = 1'b0;
  logic [19:0] prev_data = '0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // outputs of the previous cycle's load
      checks++;
      if (t_we != prev_we || (prev_we && {t_waddr, t_widx, t_wdata} != prev_data)) begin
        failures++;
        $display("FAIL load at %0t: we=%b %h expected we=%b %h", $time, t_we,
                 {t_waddr, t_widx, t_wdata}, prev_we, prev_data);
      end
      load_we   = ($urandom_range(0, 2) == 0);
      load_data = 20'($urandom);
      def_we    = ($urandom_range(0, 9) == 0);
      def_addr  = tsel_t'($urandom);
      use_mem   = $urandom_range(0, 1) == 1;
      for (int l = 0; l < NL; l++) mem_lanes[l] = state_t'($urandom);
      #1;
      for (int l = 0; l < NL; l++) begin
        tsel_t e;
        e = use_mem ? tsel_t'(mem_lanes[l][TAW-1:0]) : tdef_m;
        checks++;
        if (ib2[l] != e) begin
          failures++;
          $display("FAIL ib2[%0d] at %0t: %0d expected %0d", l, $time, ib2[l], e);
        end
      end
      if (use_mem) n_mem++; else n_def++;
      if (load_we) n_load++;
      if (def_we && def_addr != tdef_m) n_defchg++;
      prev_we   = load_we;
      prev_data = load_data;
      if (def_we) tdef_m = def_addr;
    end
    checks++;
    if (n_load == 0 || n_mem == 0 || n_def == 0 || n_defchg == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
