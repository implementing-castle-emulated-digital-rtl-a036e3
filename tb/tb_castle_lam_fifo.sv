// tb_castle_lam_fifo: self-checking test of one LAM/LLM memory unit.
//
// A small unit (DEPTH 12, WIDTH 20) is driven for 3000 cycles with random
// pushes and pops (also both in one cycle), never pushing into a full unit
// or popping an empty one, and compared every cycle with a queue model:
// the head word on rdata (fall-through), count, full and empty. Phases with
// a push bias and a pop bias make the unit fill up, run empty and wrap its
// pointers; the test counts these events and fails if one never happened.
module tb_castle_lam_fifo;

  localparam int unsigned WIDTH = 20;
  localparam int unsigned DEPTH = 12;   // not a power of two: pointers must wrap

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0]           wdata = '0;
  logic [WIDTH-1:0]           rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic                       full, empty;

  castle_lam_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0, n_wrap = 0;
  logic [WIDTH-1:0] q [$];
  int pushed = 0;

  task automatic compare();
    checks++;
    if (count != $bits(count)'(q.size()) || full != (q.size() == DEPTH) ||
        empty != (q.size() == 0) || (q.size() > 0 && rdata != q[0])) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: count=%0d full=%b empty=%b rdata=%h, model size=%0d head=%h",
                 $time, count, full, empty, rdata, q.size(), (q.size() > 0) ? q[0] : '0);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      @(negedge clk);
      #1;
      compare();
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      bias = ((t / 200) % 2 == 0) ? 70 : 30;     // alternate fill and drain phases
      push = (q.size() < DEPTH) && ($urandom_range(0, 99) < bias);
      pop  = (q.size() > 0) && ($urandom_range(0, 99) >= bias);
      if (q.size() > 0 && q.size() < DEPTH && $urandom_range(0, 9) == 0) begin
        push = 1'b1; pop = 1'b1;
      end
      wdata = WIDTH'($urandom);
      @(posedge clk);
      if (push && pop) n_both++;
      if (pop) void'(q.pop_front());
      if (push) begin
        q.push_back(wdata);
        pushed++;
        if (pushed % DEPTH == 0) n_wrap++;
      end
      @(negedge clk);
      push = 1'b0; pop = 1'b0;
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || n_both == 0 || n_wrap < 2) begin
      failures++;
      $display("FAIL: full=%0d empty=%0d push+pop=%0d wraps=%0d", n_full, n_empty, n_both, n_wrap);
    end
    $display("full=%0d empty=%0d push+pop=%0d wraps=%0d", n_full, n_empty, n_both, n_wrap);
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
