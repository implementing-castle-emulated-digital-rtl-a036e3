// castle_timing_ctrl: Timing and Control unit of the CASTLE array.
//
// Generates the register-transfer signals that all processors share. The
// array works in line periods of LINE_CYCLES clock cycles; the last cycle of
// each period carries line_shift, on which every processor moves its input
// line into its register window and starts computing the next line. Inside
// a period, cyc counts 0..LINE_CYCLES-1, and four exchange slots (io_slot_v,
// io_slot = 0..3) at cycles LINE_CYCLES-6 .. LINE_CYCLES-3 time the
// multiplexed transfers on the left and right I/O buses, after the last row
// has received its line and before the next line_shift.
//
// START (a one-cycle pulse) begins operation from cycle 0 of a period;
// HALT, while high, freezes the whole array (en low) and resumes it where it
// stopped; rst_n (the RESET pin) returns the unit to idle. en is high while
// the array runs and is not halted; nothing in the array moves without it.
//
// The unit's pins RESET, START and HALT follow the CASTLE array. The chip's
// two non-overlapping clock phases ph1/ph2 are folded here into the single
// rising-edge clock clk. The line-period protocol and the slot positions are
// this design's choices; LINE_CYCLES must be at least 3*M+10 for M cells
// per processor line.
module castle_timing_ctrl
  import castle_pkg::*;
#(
  parameter int unsigned M           = CELLS,
  parameter int unsigned LINE_CYCLES = 3 * M + 10
) (
  input  logic        clk,
  input  logic        rst_n,     // RESET
  input  logic        start,     // START
  input  logic        halt,      // HALT
  output logic        running,
  output logic        en,
  output logic        line_shift,
  output logic [$clog2(LINE_CYCLES)-1:0] cyc,
  output logic        io_slot_v,
  output logic [1:0]  io_slot
);

  localparam int unsigned CYW = $clog2(LINE_CYCLES);
  localparam int unsigned SLOT0 = LINE_CYCLES - 6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cyc     <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        cyc     <= '0;
      end
    end else if (!halt) begin
      cyc <= (cyc == CYW'(LINE_CYCLES - 1)) ? '0 : cyc + 1'b1;
    end
  end

  assign en         = running & ~halt;
  assign line_shift = en && (cyc == CYW'(LINE_CYCLES - 1));
  assign io_slot_v  = en && (cyc >= CYW'(SLOT0)) && (cyc < CYW'(SLOT0 + 4));
  assign io_slot    = 2'(cyc - CYW'(SLOT0));

  initial assert (LINE_CYCLES >= 3 * M + 10)
    else $error("castle_timing_ctrl: LINE_CYCLES too short for a line");

endmodule
