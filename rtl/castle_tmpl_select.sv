// castle_tmpl_select: template-select unit of the CASTLE platform.
//
// Serves every CASTLE chip on the platform with templates and template
// addresses:
//   * template load: a host write (load_we, load_data = {unit, index,
//     coefficient}) is registered and broadcast one cycle later on the
//     chips' template port (t_we, t_waddr, t_widx, t_wdata), so all
//     processors of all chips hold the same 16 templates;
//   * template addresses: for each processor column the unit drives the
//     IBUS2 lane either with the per-cell address read from a memory unit
//     (use_mem high, low 4 bits of the lane) or with one address set by the
//     host (def_we / def_addr) for the whole frame.
//
// A TEMPLATE SELECT block between the platform FPGA and all CASTLE chips
// follows the platform; its two functions and their timing are this
// design's choices.
module castle_tmpl_select
  import castle_pkg::*;
#(
  parameter int unsigned NL = 9      // processor columns on the platform
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              load_we,
  input  logic [19:0]       load_data,
  input  logic              def_we,
  input  tsel_t             def_addr,
  // per-cell addresses from a memory unit
  input  logic              use_mem,
  input  state_t [NL-1:0]   mem_lanes,
  // to the chips
  output tsel_t  [NL-1:0]   ib2,
  output logic              t_we,
  output tsel_t             t_waddr,
  output logic [3:0]        t_widx,
  output coef_t             t_wdata
);

  tsel_t tdef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdef    <= '0;
      t_we    <= 1'b0;
      t_waddr <= '0;
      t_widx  <= '0;
      t_wdata <= '0;
    end else begin
      if (def_we) tdef <= def_addr;
      t_we <= load_we;
      if (load_we) begin
        t_waddr <= load_data[19:16];
        t_widx  <= load_data[15:12];
        t_wdata <= load_data[11:0];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < NL; l++)
      ib2[l] = use_mem ? tsel_t'(mem_lanes[l][TAW-1:0]) : tdef;
  end

endmodule
