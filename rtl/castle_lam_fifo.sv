// castle_lam_fifo: one local analog / logic memory (LAM/LLM) unit of the
// CASTLE platform.
//
// A LAM/LLM unit is a FIFO of DEPTH entries, each WIDTH bits wide. On the
// platform an entry holds one cell position of a line for every processor
// column of the cascaded chips (a 12-bit lane per column), so a line is M
// entries and a frame M*lines entries; the default depth holds a 240-line
// frame of 40 entries per line.
//
// Interface: push writes wdata at the tail; pop removes the head. The head
// is always visible on rdata (first-word fall-through: an asynchronous
// read of the storage array), so a consumer can use rdata in the same
// cycle as it pops. Push and pop may happen in the same cycle. count, full
// and empty describe the state before the clock edge. A push into a full
// unit or a pop from an empty one is ignored and flagged by an assertion.
// The assertions are switched off during reset, so rst_n is also sampled on
// the clock there; lint then reports rst_n as used both synchronously and
// asynchronously, which concerns only the assertions, not the logic.
//
// That the LAM/LLM units are FIFO storage follows the CASTLE platform; the
// entry layout, the depth and the fall-through head are this design's
// choices.
module castle_lam_fifo #(
  parameter int unsigned WIDTH = 108,
  parameter int unsigned DEPTH = 9600
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("castle_lam_fifo: push into a full unit");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("castle_lam_fifo: pop from an empty unit");

endmodule
