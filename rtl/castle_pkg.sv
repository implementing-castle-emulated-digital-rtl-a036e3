// castle_pkg: word formats and constants shared by the CASTLE processor array.
//
// A state value (and an input u, a bias h*z or a partial sum g) is a 12-bit
// two's-complement word with 10 fraction bits, so +1.0 is 1024 and -1.0 is
// -1024; the full-signal-range limit of the array keeps states inside
// [-1024, +1024]. Template coefficients are 12-bit two's-complement words
// with 8 fraction bits (range -8.0 .. +7.996). The 12-bit accuracy, the 40
// cells per processor, the 16 template units and the 3x3 neighbourhood come
// from the CASTLE architecture; the fraction positions are this design's
// choice.
package castle_pkg;

  localparam int unsigned DW     = 12;  // state / additive word width
  localparam int unsigned DFRAC  = 10;  // fraction bits of a state word
  localparam int unsigned TW     = 12;  // template coefficient width
  localparam int unsigned TFRAC  = 8;   // fraction bits of a coefficient
  localparam int unsigned NTMPL  = 16;  // template units per processor
  localparam int unsigned TAW    = 4;   // template-select address width
  localparam int unsigned NCOEF  = 9;   // 3x3 template
  localparam int unsigned CELLS  = 40;  // cells per processor line (12-bit mode)
  localparam int unsigned PIPE   = 4;   // ALU pipeline depth / feedback distance

  // product of a state and a coefficient, and the accumulator
  localparam int unsigned PW     = DW + TW;      // 24
  localparam int unsigned AW     = PW + 4;       // 9 products + constant

  localparam logic signed [DW-1:0] ONE     = DW'(1 << DFRAC);
  localparam logic signed [DW-1:0] MINUS1  = -ONE;

  typedef logic signed [DW-1:0] state_t;
  typedef logic signed [TW-1:0] coef_t;
  typedef logic [TAW-1:0]       tsel_t;

  // Limiter behaviour of the last pipeline level.
  //   LIM_SAT : first Euler phase (g = B1*u + h*z), saturate to the word range
  //   LIM_FSR : second Euler phase, full-signal-range clip to [-1, +1]
  typedef enum logic {LIM_SAT = 1'b0, LIM_FSR = 1'b1} lim_mode_e;

  // Row of the 3x3 neighbourhood a pass reads (template row index)
  typedef enum logic [1:0] {ROW_UP = 2'd0, ROW_MID = 2'd1, ROW_DOWN = 2'd2} nrow_e;

  // Platform host (DSP) register map, 8-bit word addresses, 32-bit data.
  //   HA_CTRL   W  bit0 go (start one pass), bit1 lim mode, bit2 template
  //                addresses from a memory unit, bit3 HALT, bit4 one step
  //                (lower chip row passes lines on unchanged)
  //   HA_ROUTE  W  [1:0] state source unit, [3:2] template-address unit,
  //                [5:4] additive unit, [7:6] destination unit
  //   HA_LINES  W  lines per frame
  //   HA_TDEF   W  template address used when bit2 of HA_CTRL is clear
  //   HA_TLOAD  W  [19:16] template unit, [15:12] coefficient index,
  //                [11:0] coefficient: written to every processor
  //   HA_RDSEL  W  memory unit that HA_LANE reads and HA_POP pops
  //   HA_POP    W  pop the head entry of the HA_RDSEL unit
  //   HA_STATUS R  bit0 pass busy, bit1 chips running, bits 4+k unit k
  //                full, bits 8+k unit k empty
  //   HA_PUSH   W  push the lane staging register into unit wdata[1:0]
  //   HA_WIDTH  RW frame width in processor columns (1..NCHIPS*COLS): the
  //                last column used is the right edge of the array
  //   HA_COUNT  R  +k: number of entries in unit k
  //   HA_LANE   W  +l: write lane l of the staging register
  //             R  +l: lane l of the head entry of the HA_RDSEL unit
  localparam int unsigned NLAM = 4;   // LAM/LLM units on the platform
  localparam logic [7:0] HA_CTRL   = 8'h00;
  localparam logic [7:0] HA_ROUTE  = 8'h01;
  localparam logic [7:0] HA_LINES  = 8'h02;
  localparam logic [7:0] HA_TDEF   = 8'h03;
  localparam logic [7:0] HA_TLOAD  = 8'h04;
  localparam logic [7:0] HA_RDSEL  = 8'h05;
  localparam logic [7:0] HA_POP    = 8'h06;
  localparam logic [7:0] HA_STATUS = 8'h07;
  localparam logic [7:0] HA_PUSH   = 8'h08;
  localparam logic [7:0] HA_WIDTH  = 8'h09;
  localparam logic [7:0] HA_COUNT  = 8'h10;
  localparam logic [7:0] HA_LANE   = 8'h20;

endpackage
