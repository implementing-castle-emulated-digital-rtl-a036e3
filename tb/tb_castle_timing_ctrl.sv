// tb_castle_timing_ctrl: self-checking test of the Timing and Control unit.
//
// With M=4 (line period L=22 cycles) the test checks that the unit stays idle
// until START, that cyc counts 0..L-1 and line_shift comes on exactly every
// L-th cycle, that the four I/O slots come at cycles L-6..L-3 with slot
// numbers 0..3, that HALT freezes the count, en and line_shift for its whole
// length and the count resumes where it stopped, and that RESET returns the
// unit to idle. A cycle-level model here predicts every output.
module tb_castle_timing_ctrl;
  import castle_pkg::*;

  localparam int M = 4;
  localparam int L = 3 * M + 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, halt, running, en, line_shift, io_slot_v;
  logic [$clog2(L)-1:0] cyc;
  logic [1:0] io_slot;

  castle_timing_ctrl #(.M(M)) dut (.*);

  int checks = 0, failures = 0, n_shift = 0, n_halt = 0;
  bit m_run = 0;
  int m_cyc = 0;

  task automatic compare();
    bit e_en, e_ls, e_sv;
    #1;
    e_en = m_run && !halt;
    e_ls = e_en && (m_cyc == L - 1);
    e_sv = e_en && (m_cyc >= L - 6) && (m_cyc <= L - 3);
    checks++;
    if (running !== m_run || en !== e_en || line_shift !== e_ls || io_slot_v !== e_sv ||
        (m_run && int'(cyc) != m_cyc) || (e_sv && int'(io_slot) != m_cyc - (L - 6))) begin
      failures++;
      $display("FAIL t=%0t: run=%0d en=%0d ls=%0d sv=%0d cyc=%0d slot=%0d; model run=%0d cyc=%0d",
               $time, running, en, line_shift, io_slot_v, cyc, io_slot, m_run, m_cyc);
    end
    if (e_ls) n_shift++;
    if (m_run && halt) n_halt++;
  endtask

  // model update at each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (!m_run) begin
        if (start) begin m_run = 1; m_cyc = 0; end
      end else if (!halt) begin
        m_cyc = (m_cyc == L - 1) ? 0 : m_cyc + 1;
      end
    end
  end

  initial begin
    start = 0; halt = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 10; n++) begin @(negedge clk); compare(); end
    start = 1;
    @(negedge clk); compare();
    start = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      halt = (n >= 100 && n < 140) || (n >= 250 && n < 253);
      compare();
    end
    // RESET returns to idle
    rst_n = 1'b0; m_run = 0; m_cyc = 0;
    #1;
    compare();
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5; n++) begin @(negedge clk); compare(); end
    checks++;
    if (n_shift < 15 || n_halt < 40) begin
      failures++;
      $display("FAIL: too few line shifts (%0d) or halt cycles (%0d)", n_shift, n_halt);
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
