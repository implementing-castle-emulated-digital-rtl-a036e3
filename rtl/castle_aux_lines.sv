// castle_aux_lines: template-select register lines and register lines C of
// a CASTLE processor.
//
// Every cell of a state line arrives with a 4-bit template-select address
// (IBUS2) and an additive variable (IBUS3): h*z in the first Euler phase, g
// in the second. Both streams are shifted serially into input lines on the
// same in_valid strobes as the state values, exactly as line a0 of register
// array A. On line_shift the input lines move into a middle stage and the
// middle stage into the working lines; the working lines therefore belong
// to the state line that sits in a2, the line being computed. The read port
// (combinational) returns the working address and additive of cell rcol
// (1..CELLS); the processor uses them and passes them on, unchanged, to the
// next row of processors.
//
// The per-cell address, the per-cell additive and their unmodified
// passing-on follow the CASTLE processor. Keeping three stages (so that the
// side streams travel in step with their own state line) is this design's
// choice.
module castle_aux_lines
  import castle_pkg::*;
#(
  parameter int unsigned M = CELLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  tsel_t       in_tsel,    // IBUS2
  input  state_t      in_add,     // IBUS3
  input  logic        line_shift,
  input  logic [$clog2(M+2)-1:0] rcol,
  output tsel_t       tsel,
  output state_t      add
);

  typedef struct packed {
    tsel_t  tsel;
    state_t add;
  } aux_t;

  aux_t x0 [1:M];
  aux_t x1 [1:M];
  aux_t x2 [1:M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j <= M; j++) begin
        x0[j] <= '0; x1[j] <= '0; x2[j] <= '0;
      end
    end else if (en) begin
      if (in_valid) begin
        for (int j = 1; j < M; j++) x0[j] <= x0[j+1];
        x0[M] <= '{tsel: in_tsel, add: in_add};
      end
      if (line_shift) begin
        x1 <= x0;
        x2 <= x1;
      end
    end
  end

  always_comb begin
    aux_t w;
    w    = x2[(rcol >= 1 && int'(rcol) <= M) ? int'(rcol) : 1];
    tsel = w.tsel;
    add  = w.add;
  end

endmodule
