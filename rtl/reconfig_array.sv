// reconfig_array: the 4 x 12 reconfigurable array of CALUs (the "RA").
//
// A multiplier-less FIR filter is built as a signal-flow graph of adders,
// subtractors, shifters and delays. Twelve columns of four CALUs (rows: A/S,
// L/R, A/S, L/R) are chained through mux arrays of six 4:1 multiplexers;
// every CALU of column 0 takes the input sample x. A column of six pipeline
// registers sits in front of every fifth column (columns 5 and 10), and a
// single output A/S CALU with a fixed one-cycle delay combines two outputs
// of the last column into y. With all CALU delays at 0 a sample needs 3
// cycles from x to y (two register columns and the output CALU); with all
// at 3 it needs 3 + 12*3 = 39, so filters of up to 36 taps can be formed.
//
// Configuration: `cfg_word` is taken into the configuration register when
// `cfg_load` is high. Its layout, MSB first, is {col_cfg[NCOLS-1:0],
// mux_cfg[NCOLS-1:1], fin_sel[1:0], fin_sub}; with 12 columns that is
// 168 + 132 + 4 + 1 = 305 bits. Loading a configuration clears the
// saturation count but not the data in the delay chains, so input samples
// keep flowing while the array is reconfigured. A new sample is accepted
// every clock cycle. CALUs that do not reach the output are clock-disabled
// (activity_unit); `n_active` is the number of CALUs in use.
//
// The column and mux counts, the CALU configuration sizes, the delay range,
// the register columns and the output CALU follow the design; the placement
// of the register columns in front of columns 5 and 10, the layout of the
// configuration word and the reset behaviour are this implementation's.
module reconfig_array
  import ehw_pkg::*;
#(
  parameter  int unsigned NCOLS     = 12,
  parameter  int unsigned REG_EVERY = 5,
  parameter  int unsigned SAT_CW    = 16,
  localparam int unsigned CFG_W     = cfg_width(NCOLS),
  localparam int unsigned NCALU     = NCOLS * NROWS + 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_load,
  input  logic [CFG_W-1:0]                  cfg_word,
  input  logic signed [DW-1:0]              x,
  output hyb_t                              y,
  output logic signed [DW+EXP_SHIFT-1:0]    y_value,
  output logic [SAT_CW-1:0]                 sat_count,
  output logic                              sat_any,
  output logic                              ovf_any,
  output logic [NCOLS-1:0][NROWS-1:0]       active,
  output logic [$clog2(NCOLS*NROWS+2)-1:0]  n_active
);
  // ---------------------------------------------------------------- config
  logic [CFG_W-1:0]          cfg_q;
  col_cfg_t [NCOLS-1:0]      col_cfg;
  mux_cfg_t [NCOLS-1:1]      mux_cfg;
  mux_sel_t [1:0]            fin_sel;
  logic                      fin_sub;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (cfg_load) cfg_q <= cfg_word;
  end

  assign {col_cfg, mux_cfg, fin_sel, fin_sub} = cfg_q;

  activity_unit #(.NCOLS(NCOLS)) u_act (
    .mux_cfg(mux_cfg), .fin_sel(fin_sel), .active(active), .n_active(n_active)
  );

  // ------------------------------------------------------------- the array
  // Each column's signals live in its own generate scope, so that no array
  // variable spans the whole chain of columns.
  logic [NCOLS-1:0][NROWS-1:0] col_sat, col_ovf;

  for (genvar c = 0; c < int'(NCOLS); c++) begin : g_col
    hyb_t [NMUX-1:0]  in;
    hyb_t [NROWS-1:0] out;
    if (c == 0) begin : g_first
      assign in = {NMUX{hyb_t'{prot: 1'b0, m: x}}};
    end else begin : g_link
      hyb_t [NMUX-1:0] mux_out;
      mux_array u_mux (.prev(g_col[c-1].out), .sel(mux_cfg[c]), .out(mux_out));
      if (c % int'(REG_EVERY) == 0) begin : g_reg
        reg_column u_reg (.clk(clk), .rst_n(rst_n), .d(mux_out), .q(in));
      end else begin : g_wire
        assign in = mux_out;
      end
    end
    calu_column u_col (
      .clk(clk), .rst_n(rst_n), .en(active[c]), .cfg(col_cfg[c]),
      .in(in), .out(out), .ovf(col_ovf[c]), .sat(col_sat[c])
    );
  end

  hyb_t [NROWS-1:0] last_out;
  assign last_out = g_col[NCOLS-1].out;

  // ------------------------------------------------------- output CALU
  logic fin_sat, fin_ovf;

  as_calu #(.FIXED_DLY1(1'b1)) u_out (
    .clk(clk), .rst_n(rst_n), .en(1'b1),
    .cfg('{dly: 2'd1, sub: fin_sub}),
    .a(last_out[fin_sel[0]]), .b(last_out[fin_sel[1]]),
    .y(y), .ovf(fin_ovf), .sat(fin_sat)
  );

  assign y_value = hyb_value(y);

  // ------------------------------------------------------ saturation count
  logic [NCALU-1:0] sat_ev, ovf_ev;
  assign sat_ev  = {fin_sat, col_sat & active};
  assign ovf_ev  = {fin_ovf, col_ovf & active};
  assign sat_any = |sat_ev;
  assign ovf_any = |ovf_ev;

  sat_counter #(.N(NCALU), .CW(SAT_CW)) u_sat (
    .clk(clk), .rst_n(rst_n), .clr(cfg_load), .ev(sat_ev), .count(sat_count)
  );
endmodule
