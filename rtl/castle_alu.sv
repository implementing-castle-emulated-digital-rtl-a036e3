// castle_alu: the 4-level pipeline arithmetic unit of a CASTLE processor.
//
// Computes  y = limit( sum_{k=0..8} a_k * b_k + c )  for one cell, three
// operand pairs at a time. Each issue multiplies three state values (one
// row of the 3x3 neighbourhood) by three template coefficients and adds
// the C operand. On the first of a cell's three issues C is the additive
// variable of that cell (h*z in the first Euler phase, g in the second); on
// the second and third issues C is the cell's partial sum, fed back from the
// level-4 feedback register. The last issue of a cell also passes the sum
// through the limiter into the output register Y.
//
// Levels (each ends in a register line, as in the four-level pipeline):
//   1: three multipliers, C select                -> p1, p2, p3, c
//   2: two adders  p1+p2 and p3+c                 -> s12, s3c
//   3: one adder   s12+s3c                        -> s
//   4: limiter into Y, and s into the feedback register that feeds C
// The feedback path runs through four registers (level 1 C, levels 2, 3
// and the feedback register), so a cell's next issue must come exactly
// PIPE=4 cycles after its previous one: the processor interleaves four
// cells, which keeps every level busy on every cycle.
//
// Timing: an issue presented in cycle t with last=1 gives y_valid and y in
// cycle t+4. Everything advances only while en is high.
//
// The sum is kept at full precision (product scale 2^(DFRAC+TFRAC)); the
// result is shifted right by TFRAC (rounding toward minus infinity) and then
// limited: to [-1,+1] in LIM_FSR mode (full signal range model) and to the
// 12-bit word range in LIM_SAT mode. The product split into three
// multipliers, the feedback to C and the four levels follow the CASTLE
// pipeline; the fraction formats, the rounding and the two limiter modes
// are this design's choices.
module castle_alu
  import castle_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  // issue
  input  logic       in_valid,
  input  logic       in_first,   // C := cval (else C := fed-back partial sum)
  input  logic       in_last,    // third issue of the cell: produce y
  input  lim_mode_e  in_lim,
  input  state_t     a1, a2, a3,
  input  coef_t      b1, b2, b3,
  input  state_t     cval,
  // result
  output logic       y_valid,
  output state_t     y
);

  typedef logic signed [AW-1:0] acc_t;

  // level 1
  logic      v1, l1;
  lim_mode_e m1;
  acc_t      p1, p2, p3, c1;
  // level 2
  logic      v2, l2;
  lim_mode_e m2;
  acc_t      s12, s3c;
  // level 3
  logic      v3, l3;
  lim_mode_e m3;
  acc_t      s;
  // level 4 feedback register
  acc_t      fb;

  acc_t c_sel;
  always_comb begin
    if (in_first) c_sel = acc_t'(cval) <<< TFRAC;
    else          c_sel = fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; l1 <= 1'b0; m1 <= LIM_FSR;
      p1 <= '0; p2 <= '0; p3 <= '0; c1 <= '0;
      v2 <= 1'b0; l2 <= 1'b0; m2 <= LIM_FSR; s12 <= '0; s3c <= '0;
      v3 <= 1'b0; l3 <= 1'b0; m3 <= LIM_FSR; s <= '0;
      fb <= '0;
      y_valid <= 1'b0; y <= '0;
    end else if (en) begin
      // level 1
      v1 <= in_valid;
      l1 <= in_valid & in_last;
      m1 <= in_lim;
      p1 <= acc_t'(a1 * b1);
      p2 <= acc_t'(a2 * b2);
      p3 <= acc_t'(a3 * b3);
      c1 <= c_sel;
      // level 2
      v2  <= v1; l2 <= l1; m2 <= m1;
      s12 <= p1 + p2;
      s3c <= p3 + c1;
      // level 3
      v3 <= v2; l3 <= l2; m3 <= m2;
      s  <= s12 + s3c;
      // level 4
      fb      <= s;
      y_valid <= v3 & l3;
      y       <= limit(s, m3);
    end
  end

  function automatic state_t limit(acc_t sum, lim_mode_e mode);
    acc_t sh, hi, lo;
    sh = sum >>> TFRAC;
    if (mode == LIM_FSR) begin
      hi = acc_t'(ONE);
      lo = acc_t'(MINUS1);
    end else begin
      hi = acc_t'(2**(DW-1) - 1);
      lo = -acc_t'(2**(DW-1));
    end
    if (sh > hi)      limit = state_t'(hi);
    else if (sh < lo) limit = state_t'(lo);
    else              limit = state_t'(sh);
  endfunction

endmodule
