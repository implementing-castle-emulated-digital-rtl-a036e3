// castle_platform: the CASTLE test platform - a row of CASTLE chips with
// its memory units, template select and control FPGA.
//
// NCHIPS chips stand side by side; chip k's I/O_RIGHT bus is joined to chip
// k+1's I/O_LEFT bus, so together they form one array COLS*M*NCHIPS cells
// wide (360 with the defaults) that performs two Euler iterations per pass.
// The outer chips are marked as array edges; a narrower frame (HA_WIDTH
// processor columns) gets its right edge at its own last column. The four LAM/LLM units hold
// frames line by line: an entry is one cell position for all NCHIPS*COLS
// processor columns (a 12-bit lane each), a line is M entries. The FPGA
// controller streams a frame from its source units through the chips into
// a destination unit, and writes the template addresses and additives that
// leave the chips back into their own units. The template-select unit loads
// all processors with the same templates and drives the IBUS2 lanes.
//
// The host (DSP) reaches everything through the register bus h_*; the map
// is in castle_pkg. frame_out is the chips' frendout (first result line of a
// frame leaving the array).
//
// The row of chips, the four LAM/LLM units, the template select and the
// FPGA follow the platform; the default of three chips follows the first
// platform built. The memory organisation, the bus between chips and the
// control are this design's choices; the chips' two-phase clock is one
// clock here.
module castle_platform
  import castle_pkg::*;
#(
  parameter int unsigned NCHIPS = 3,
  parameter int unsigned COLS   = 3,
  parameter int unsigned M      = CELLS,
  parameter int unsigned DEPTH  = 9600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_we,
  input  logic [7:0]  h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        frame_out
);

  localparam int unsigned NL   = NCHIPS * COLS;
  localparam int unsigned LC   = 3 * M + 10;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  // chip controls
  logic            c_start, c_halt, c_frendin, c_lastline, c_ib_valid;
  lim_mode_e       c_lim;
  logic [NL-1:0]   c_redge;
  logic            c_one_step;
  state_t [NL-1:0] c_ib1, c_ib3, c_ob1, c_ob3, ts_lanes;
  tsel_t  [NL-1:0] c_ib2, c_ob2;
  logic            t_we;
  tsel_t           t_waddr;
  logic [3:0]      t_widx;
  coef_t           t_wdata;
  logic            ts_load_we, ts_def_we, ts_use_mem;
  logic [19:0]     ts_load_data;
  tsel_t           ts_def_addr;

  // per-chip status
  logic                 running    [NCHIPS];
  logic                 line_shift [NCHIPS];
  logic [$clog2(LC)-1:0] cyc       [NCHIPS];
  logic                 frendout   [NCHIPS];
  logic                 ob_valid   [NCHIPS];

  // chip-to-chip buses
  state_t il_o [NCHIPS], il_i [NCHIPS], ir_o [NCHIPS], ir_i [NCHIPS];
  logic   il_oe [NCHIPS], ir_oe [NCHIPS];

  for (genvar k = 0; k < NCHIPS; k++) begin : g_chip
    state_t ib1 [COLS], ib3 [COLS], ob1 [COLS], ob3 [COLS];
    tsel_t  ib2 [COLS], ob2 [COLS];

    for (genvar c = 0; c < COLS; c++) begin : g_lane
      assign ib1[c] = c_ib1[k*COLS+c];
      assign ib2[c] = c_ib2[k*COLS+c];
      assign ib3[c] = c_ib3[k*COLS+c];
      assign c_ob1[k*COLS+c] = ob1[c];
      assign c_ob2[k*COLS+c] = ob2[c];
      assign c_ob3[k*COLS+c] = ob3[c];
    end

    if (k == 0) begin : g_l
      assign il_i[k] = '0;
    end else begin : g_l
      assign il_i[k] = ir_oe[k-1] ? ir_o[k-1] : il_o[k];
    end
    if (k == NCHIPS - 1) begin : g_r
      assign ir_i[k] = '0;
    end else begin : g_r
      assign ir_i[k] = il_oe[k+1] ? il_o[k+1] : ir_o[k];
    end

    castle_chip #(.COLS(COLS), .M(M)) u_chip (
      .clk, .rst_n,
      .start (c_start), .halt (c_halt), .lim (c_lim),
      .chip_left_edge  (k == 0),
      .chip_right_edge (k == NCHIPS - 1),
      .col_right_edge  (c_redge[k*COLS +: COLS]),
      .row_bypass      ({c_one_step, 1'b0}),
      .running (running[k]), .line_shift (line_shift[k]), .cyc (cyc[k]),
      .frendin (c_frendin), .lastline (c_lastline), .frendout (frendout[k]),
      .t_we, .t_waddr, .t_widx, .t_wdata,
      .ib_valid (c_ib_valid), .ib1, .ib2, .ib3,
      .ob_valid (ob_valid[k]), .ob1, .ob2, .ob3,
      .io_left_o (il_o[k]), .io_left_oe (il_oe[k]), .io_left_i (il_i[k]),
      .io_right_o (ir_o[k]), .io_right_oe (ir_oe[k]), .io_right_i (ir_i[k])
    );
  end

  assign frame_out = frendout[0];

  // memory units
  logic            f_push  [NLAM];
  logic            f_pop   [NLAM];
  state_t [NL-1:0] f_wdata [NLAM];
  state_t [NL-1:0] f_rdata [NLAM];
  logic [CNTW-1:0] f_count [NLAM];
  logic            f_full  [NLAM];
  logic            f_empty [NLAM];

  for (genvar u = 0; u < NLAM; u++) begin : g_lam
    castle_lam_fifo #(.WIDTH(NL * DW), .DEPTH(DEPTH)) u_lam (
      .clk, .rst_n,
      .push (f_push[u]), .wdata (f_wdata[u]),
      .pop  (f_pop[u]),  .rdata (f_rdata[u]),
      .count (f_count[u]), .full (f_full[u]), .empty (f_empty[u])
    );
  end

  castle_tmpl_select #(.NL(NL)) u_ts (
    .clk, .rst_n,
    .load_we (ts_load_we), .load_data (ts_load_data),
    .def_we (ts_def_we), .def_addr (ts_def_addr),
    .use_mem (ts_use_mem), .mem_lanes (ts_lanes),
    .ib2 (c_ib2),
    .t_we, .t_waddr, .t_widx, .t_wdata
  );

  castle_fpga_ctrl #(.NL(NL), .M(M), .LINE_CYCLES(LC), .CNTW(CNTW)) u_ctrl (
    .clk, .rst_n,
    .h_we, .h_addr, .h_wdata, .h_rdata,
    .c_running (running[0]), .c_line_shift (line_shift[0]), .c_cyc (cyc[0]),
    .c_start, .c_halt, .c_lim, .c_one_step, .c_redge, .c_frendin, .c_lastline,
    .c_ib_valid, .c_ib1, .c_ib3,
    .c_ob_valid (ob_valid[0]), .c_ob1, .c_ob2, .c_ob3,
    .ts_load_we, .ts_load_data, .ts_def_we, .ts_def_addr, .ts_use_mem, .ts_lanes,
    .f_push, .f_wdata, .f_pop, .f_rdata, .f_count, .f_full, .f_empty
  );

endmodule
