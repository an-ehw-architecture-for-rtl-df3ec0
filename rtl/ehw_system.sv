// ehw_system: evolvable-hardware FIR filter platform.
//
// The reconfigurable array (reconfig_array) filters the sensor sample
// stream x into y, one sample per clock, under a configuration word chosen
// by an external evolution engine (a genetic algorithm, not part of this
// RTL). The array reports back how many saturations occurred since the last
// configuration was applied and how many CALUs the configuration uses. For
// evolution against a frequency response, a 256-point radix-4 FFT captures
// 256 consecutive samples of either the input x (fft_src = 0) or the output
// y (fft_src = 1, sampled together with fft_start) and returns their spectrum scaled by 1/256, from which the
// engine forms |Y|^2/|X|^2. Only one FFT exists: the input spectrum is taken
// once and the output spectrum after each new configuration.
//
// Interface timing: see reconfig_array (configuration load, 3..39 cycle
// filter latency) and fft256_r4 (start, 768-cycle transform, bin stream).
// The engine's ports are brought out as plain signals. The sharing of one
// FFT between x and y through `fft_src` is this implementation's reading of
// the system block diagram.
module ehw_system
  import ehw_pkg::*;
#(
  parameter  int unsigned NCOLS     = 12,
  parameter  int unsigned REG_EVERY = 5,
  parameter  int unsigned SAT_CW    = 16,
  localparam int unsigned CFG_W     = cfg_width(NCOLS),
  localparam int unsigned VW        = DW + EXP_SHIFT,
  localparam int unsigned FW        = VW + 2
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // sensor data path
  input  logic signed [DW-1:0]             x,
  output hyb_t                             y,
  output logic signed [VW-1:0]             y_value,
  // configuration from the evolution engine
  input  logic                             cfg_load,
  input  logic [CFG_W-1:0]                 cfg_word,
  // feedback to the evolution engine
  output logic [SAT_CW-1:0]                sat_count,
  output logic [$clog2(NCOLS*NROWS+2)-1:0] n_active,
  output logic [NCOLS-1:0][NROWS-1:0]      active,
  output logic                             sat_any,
  output logic                             ovf_any,
  // spectrum of x or y
  input  logic                             fft_start,
  input  logic                             fft_src,
  output logic                             fft_busy,
  output logic                             fft_valid,
  output logic [7:0]                       fft_idx,
  output logic signed [FW-1:0]             fft_re,
  output logic signed [FW-1:0]             fft_im
);
  reconfig_array #(.NCOLS(NCOLS), .REG_EVERY(REG_EVERY), .SAT_CW(SAT_CW)) u_ra (
    .clk(clk), .rst_n(rst_n), .cfg_load(cfg_load), .cfg_word(cfg_word),
    .x(x), .y(y), .y_value(y_value), .sat_count(sat_count),
    .sat_any(sat_any), .ovf_any(ovf_any), .active(active), .n_active(n_active)
  );

  // The source is sampled with fft_start and held for the whole capture.
  logic src_q, src_now;
  logic signed [VW-1:0] fft_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     src_q <= 1'b0;
    else if (fft_start && !fft_busy) src_q <= fft_src;
  end

  assign src_now = (fft_start && !fft_busy) ? fft_src : src_q;
  assign fft_in  = src_now ? y_value : VW'(x);

  fft256_r4 #(.IW(VW), .W(FW)) u_fft (
    .clk(clk), .rst_n(rst_n), .start(fft_start), .in_sample(fft_in),
    .busy(fft_busy), .out_valid(fft_valid), .out_idx(fft_idx),
    .out_re(fft_re), .out_im(fft_im)
  );
endmodule
