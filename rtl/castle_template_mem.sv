// castle_template_mem: the 16 template units of one CASTLE processor.
//
// Each template unit holds one 3x3 template (nine coefficients). Coefficient
// k = 3*r + c multiplies the neighbour in template row r (0 = upper line,
// 1 = own line, 2 = lower line) and column c (0 = left, 1 = own, 2 = right).
// The processor reads one template row per ALU issue: raddr picks the unit
// (the template-select address that travels with every cell) and rrow the
// row; the three coefficients of that row appear combinationally on
// b[0..2].
//
// Loading: one coefficient per clock through we/waddr/widx/wdata, written
// at the rising edge. Reset clears all units to zero.
//
// That there are 16 units and that a unit is picked per cell follows the
// CASTLE processor; the write port and the coefficient order are this
// design's choices.
module castle_template_mem
  import castle_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // load port
  input  logic        we,
  input  tsel_t       waddr,
  input  logic [3:0]  widx,    // 0..8
  input  coef_t       wdata,
  // read port
  input  tsel_t       raddr,
  input  nrow_e       rrow,
  output coef_t       b [3]
);

  coef_t units [NTMPL][NCOEF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NTMPL; u++)
        for (int k = 0; k < NCOEF; k++)
          units[u][k] <= '0;
    end else if (we && widx < 4'(NCOEF)) begin
      units[waddr][widx] <= wdata;
    end
  end

  always_comb begin
    for (int c = 0; c < 3; c++)
      b[c] = units[raddr][3*int'(rrow) + c];
  end

endmodule
