// castle_fpga_ctrl: control logic of the CASTLE platform FPGA.
//
// Sits between the DSP (host register bus) and the chips and the four
// LAM/LLM memory units. The host loads frames into the memory units lane by
// lane, loads templates, sets the routing and starts a pass; the controller
// then streams one frame through the row of chips and back into memory.
//
// A pass (HA_CTRL bit0) works in the chips' line periods:
//   * if the chips are not running yet it pulses their START, then it waits
//     for the next line_shift;
//   * in period li = 0 .. lines-1 it pops M entries (one per cycle, cycles
//     1..M of the period) from the state unit, the additive unit and, with
//     per-cell addresses, the template-address unit, and strobes them into
//     the chips' IB1/IB3 (and, through the template-select unit, IB2) lanes;
//     frendin is raised in period 0 and lastline in period lines-1;
//   * every result cell leaving the chips (ob_valid) is pushed into the
//     destination unit, and the additive and template address that leave
//     with it are pushed back into the units they came from, so that those
//     units hold the same frame again after the pass and the next pass can
//     reuse them;
//   * the pass ends after period lines+3, when the last result line has
//     left two chip rows; HA_STATUS bit0 (busy) falls.
// A following pass with source and destination swapped performs the next
// two Euler iterations; with HA_CTRL bit4 (one step) the lower chip row
// passes the lines on unchanged, so the pass performs a single step, as
// the first Euler phase (g = B1*u + h*z) needs. HA_WIDTH sets how many processor columns a frame
// uses; the last of them is told to act as the right edge of the array.
// HA_CTRL bit3 halts the chips (HALT) and the stream.
// Host accesses are single-cycle writes (h_we) and combinational reads.
// The register map is defined in castle_pkg.
//
// The FPGA between the DSP and the chips, the memory units and the template
// select follow the platform; every detail of the control, the register map
// and the routing is this design's own, as the platform's control functions
// are not specified further.
module castle_fpga_ctrl
  import castle_pkg::*;
#(
  parameter int unsigned NL          = 9,
  parameter int unsigned M           = CELLS,
  parameter int unsigned LINE_CYCLES = 3 * M + 10,
  parameter int unsigned CNTW        = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host (DSP) bus
  input  logic                   h_we,
  input  logic [7:0]             h_addr,
  input  logic [31:0]            h_wdata,
  output logic [31:0]            h_rdata,
  // chip status and control
  input  logic                   c_running,
  input  logic                   c_line_shift,
  input  logic [$clog2(LINE_CYCLES)-1:0] c_cyc,
  output logic                   c_start,
  output logic                   c_halt,
  output lim_mode_e              c_lim,
  output logic                   c_one_step,
  output logic [NL-1:0]          c_redge,
  output logic                   c_frendin,
  output logic                   c_lastline,
  output logic                   c_ib_valid,
  output state_t [NL-1:0]        c_ib1,
  output state_t [NL-1:0]        c_ib3,
  input  logic                   c_ob_valid,
  input  state_t [NL-1:0]        c_ob1,
  input  tsel_t  [NL-1:0]        c_ob2,
  input  state_t [NL-1:0]        c_ob3,
  // template-select unit
  output logic                   ts_load_we,
  output logic [19:0]            ts_load_data,
  output logic                   ts_def_we,
  output tsel_t                  ts_def_addr,
  output logic                   ts_use_mem,
  output state_t [NL-1:0]        ts_lanes,
  // memory units
  output logic                   f_push  [NLAM],
  output state_t [NL-1:0]        f_wdata [NLAM],
  output logic                   f_pop   [NLAM],
  input  state_t [NL-1:0]        f_rdata [NLAM],
  input  logic [CNTW-1:0]        f_count [NLAM],
  input  logic                   f_full  [NLAM],
  input  logic                   f_empty [NLAM]
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN} state_e;

  state_e           st;
  logic [15:0]      lines;
  logic [15:0]      li;
  logic [7:0]       width;
  logic [1:0]       src_x, src_t, src_g, dst, rdsel;
  logic             use_mem;
  state_t [NL-1:0]  stage;
  logic             send;

  logic wr_ctrl;
  assign wr_ctrl = h_we && h_addr == HA_CTRL;

  // ---------------- host registers and pass sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lines <= 16'd1; li <= '0;
      src_x <= 2'd0; src_t <= 2'd1; src_g <= 2'd2; dst <= 2'd3; rdsel <= 2'd0;
      width <= 8'(NL);
      c_one_step <= 1'b0;
      use_mem <= 1'b0; c_lim <= LIM_FSR; c_halt <= 1'b0; c_start <= 1'b0;
      stage <= '0;
    end else begin
      c_start <= 1'b0;
      if (h_we) begin
        unique case (h_addr)
          HA_CTRL: begin
            c_lim   <= lim_mode_e'(h_wdata[1]);
            use_mem <= h_wdata[2];
            c_halt  <= h_wdata[3];
            c_one_step <= h_wdata[4];
          end
          HA_ROUTE: {dst, src_g, src_t, src_x} <= h_wdata[7:0];
          HA_LINES: lines <= h_wdata[15:0];
          HA_RDSEL: rdsel <= h_wdata[1:0];
          HA_WIDTH: width <= h_wdata[7:0];
          default: begin
            if (h_addr >= HA_LANE && h_addr < HA_LANE + 8'(NL))
              stage[h_addr - HA_LANE] <= h_wdata[DW-1:0];
          end
        endcase
      end
      unique case (st)
        S_IDLE: if (wr_ctrl && h_wdata[0]) begin
          st      <= S_WAIT;
          c_start <= !c_running;
        end
        S_WAIT: if (c_line_shift) begin
          st <= S_RUN;
          li <= '0;
        end
        default: if (c_line_shift) begin
          if (li == lines + 16'd3) st <= S_IDLE;
          li <= li + 1'b1;
        end
      endcase
    end
  end

  assign send = (st == S_RUN) && (li < lines) && !c_halt &&
                (c_cyc >= ($bits(c_cyc))'(1)) && (c_cyc <= ($bits(c_cyc))'(M));

  // processor column width-1 is the right edge of the array
  always_comb begin
    for (int l = 0; l < NL; l++) c_redge[l] = (width == 8'(l + 1));
  end

  assign c_frendin  = (st == S_RUN) && (li == 16'd0);
  assign c_lastline = (st == S_RUN) && (li == lines - 16'd1);
  assign c_ib_valid = send;
  assign c_ib1      = f_rdata[src_x];
  assign c_ib3      = f_rdata[src_g];
  assign ts_lanes   = f_rdata[src_t];
  assign ts_use_mem = use_mem;

  assign ts_load_we   = h_we && h_addr == HA_TLOAD;
  assign ts_load_data = h_wdata[19:0];
  assign ts_def_we    = h_we && h_addr == HA_TDEF;
  assign ts_def_addr  = h_wdata[TAW-1:0];

  // ---------------- memory unit ports ----------------
  state_t [NL-1:0] ob2_lanes;
  always_comb begin
    for (int l = 0; l < NL; l++) ob2_lanes[l] = state_t'(c_ob2[l]);
  end

  always_comb begin
    for (int k = 0; k < NLAM; k++) begin
      f_pop[k]   = 1'b0;
      f_push[k]  = 1'b0;
      f_wdata[k] = stage;
      if (send && (2'(k) == src_x || 2'(k) == src_g || (use_mem && 2'(k) == src_t)))
        f_pop[k] = 1'b1;
      if (h_we && h_addr == HA_POP && 2'(k) == rdsel)
        f_pop[k] = 1'b1;
      if (h_we && h_addr == HA_PUSH && 2'(k) == h_wdata[1:0])
        f_push[k] = 1'b1;
      if (c_ob_valid) begin
        if (2'(k) == dst) begin
          f_push[k] = 1'b1; f_wdata[k] = c_ob1;
        end else if (2'(k) == src_g) begin
          f_push[k] = 1'b1; f_wdata[k] = c_ob3;
        end else if (use_mem && 2'(k) == src_t) begin
          f_push[k] = 1'b1; f_wdata[k] = ob2_lanes;
        end
      end
    end
  end

  // ---------------- host read ----------------
  always_comb begin
    h_rdata = '0;
    if (h_addr == HA_STATUS) begin
      h_rdata[0] = (st != S_IDLE);
      h_rdata[1] = c_running;
      for (int k = 0; k < NLAM; k++) begin
        h_rdata[4+k] = f_full[k];
        h_rdata[8+k] = f_empty[k];
      end
    end
    else if (h_addr >= HA_COUNT && h_addr < HA_COUNT + 8'(NLAM))
      h_rdata = 32'(f_count[h_addr[1:0]]);
    else if (h_addr >= HA_LANE && h_addr < HA_LANE + 8'(NL))
      h_rdata = 32'(signed'(f_rdata[rdsel][h_addr - HA_LANE]));
    else if (h_addr == HA_ROUTE)
      h_rdata = {24'd0, dst, src_g, src_t, src_x};
    else if (h_addr == HA_LINES)
      h_rdata = {16'd0, lines};
    else if (h_addr == HA_WIDTH)
      h_rdata = {24'd0, width};
  end

endmodule
