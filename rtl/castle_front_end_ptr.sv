// castle_front_end_ptr: Front-End-Pointer of the CASTLE array.
//
// Tells each row of processors when the line it computes is the front (first
// line) or the end (last line) of the state matrix, so that those rows build
// the top and bottom boundary from their own lines.
//
// The host raises frendin during the line period in which the first line of
// a frame enters the array, and lastline during the period in which the last
// line enters. Both are sampled at line_shift into two marker chains that
// advance one stage per line_shift. A line entering row 0 in period P sits
// in a1 during P+1 and is computed in P+2; its result enters row 1 in P+2
// and is computed in P+4. Row r therefore computes the marked line while
// chain stage 2r+1 is set: front[r] / last[r] are those stages. frendout is
// high during the period in which the last row sends the first line of a
// frame out, so it can serve as frendin of a chip below.
//
// The pins frendin, lastline and frendout and the row selection follow the
// CASTLE array; the chain form and the timing are this design's choices.
module castle_front_end_ptr #(
  parameter int unsigned ROWS = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            line_shift,
  input  logic            frendin,
  input  logic            lastline,
  output logic [ROWS-1:0] front,
  output logic [ROWS-1:0] last,
  output logic            frendout
);

  localparam int unsigned N = 2 * ROWS;

  logic [N-1:0] fchain, lchain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fchain <= '0;
      lchain <= '0;
    end else if (en && line_shift) begin
      fchain <= {fchain[N-2:0], frendin};
      lchain <= {lchain[N-2:0], lastline};
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      front[r] = fchain[2*r+1];
      last[r]  = lchain[2*r+1];
    end
  end

  assign frendout = fchain[N-1];

endmodule
