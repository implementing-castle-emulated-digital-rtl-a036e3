// tb_castle_edge_io: self-checking test of the time-multiplexed I/O buses.
//
// Two edge-I/O units (ROWS=2) stand for two neighbouring chips: unit 0's
// I/O_RIGHT and unit 1's I/O_LEFT form one bus. In every round each unit
// gets random edge cells; the four slots run in order. The test checks that
// only one side drives the bus in any slot, that an array-edge side never
// drives, that after the slots each unit holds exactly the neighbour's cells
// (right_rx of unit 0 = first cells of unit 1, left_rx of unit 1 = last cells
// of unit 0) and that nothing moves outside the slots or while en is low.
module tb_castle_edge_io;
  import castle_pkg::*;

  localparam int ROWS = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       en, slot_v;
  logic [1:0] slot;
  state_t     ltx [2][ROWS], rtx [2][ROWS], lrx [2][ROWS], rrx [2][ROWS];
  state_t     il_o [2], ir_o [2];
  logic       il_oe [2], ir_oe [2];
  state_t     bus;

  assign bus = ir_oe[0] ? ir_o[0] : (il_oe[1] ? il_o[1] : '0);

  for (genvar k = 0; k < 2; k++) begin : g_u
    castle_edge_io #(.ROWS(ROWS)) u_io (
      .clk, .rst_n, .en,
      .chip_left_edge (k == 0), .chip_right_edge (k == 1),
      .slot_v, .slot,
      .left_tx (ltx[k]), .right_tx (rtx[k]), .left_rx (lrx[k]), .right_rx (rrx[k]),
      .io_left_o (il_o[k]), .io_left_oe (il_oe[k]), .io_left_i (k == 1 ? bus : '0),
      .io_right_o (ir_o[k]), .io_right_oe (ir_oe[k]), .io_right_i (k == 0 ? bus : '0)
    );
  end

  int checks = 0, failures = 0, n_xfer = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if ((ir_oe[0] && il_oe[1]) || il_oe[0] || ir_oe[1]) begin
        failures++;
        $display("FAIL: illegal bus drive");
      end
      if (ir_oe[0] || il_oe[1]) n_xfer++;
    end
  end

  initial begin
    en = 1; slot_v = 0; slot = 0;
    for (int k = 0; k < 2; k++)
      for (int r = 0; r < ROWS; r++) begin ltx[k][r] = 0; rtx[k][r] = 0; end
    #12 rst_n = 1'b1;
    for (int round = 0; round < 30; round++) begin
      state_t old_r0 [ROWS], old_l1 [ROWS];
      bit frozen;
      frozen = (round % 5 == 4);
      for (int r = 0; r < ROWS; r++) begin
        old_r0[r] = rrx[0][r]; old_l1[r] = lrx[1][r];
      end
      @(negedge clk);
      for (int k = 0; k < 2; k++)
        for (int r = 0; r < ROWS; r++) begin
          ltx[k][r] = state_t'($urandom); rtx[k][r] = state_t'($urandom);
        end
      // idle cycles: nothing may be captured
      repeat (3) @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (rrx[0][r] !== old_r0[r] || lrx[1][r] !== old_l1[r]) begin
          failures++;
          $display("FAIL: capture outside a slot");
        end
      end
      en = !frozen;
      for (int s = 0; s < 4; s++) begin
        slot_v = 1; slot = 2'(s);
        @(negedge clk);
      end
      slot_v = 0; en = 1;
      for (int r = 0; r < ROWS; r++) begin
        state_t e0, e1;
        e0 = frozen ? old_r0[r] : ltx[1][r];
        e1 = frozen ? old_l1[r] : rtx[0][r];
        checks++;
        if (rrx[0][r] !== e0 || lrx[1][r] !== e1) begin
          failures++;
          $display("FAIL round %0d row %0d: right_rx0=%0d (exp %0d) left_rx1=%0d (exp %0d)",
                   round, r, rrx[0][r], e0, lrx[1][r], e1);
        end
      end
    end
    checks++;
    if (n_xfer == 0) begin failures++; $display("FAIL: no transfer"); end
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
