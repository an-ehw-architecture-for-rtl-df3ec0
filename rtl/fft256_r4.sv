// fft256_r4: radix-4, 256-point pipelined FFT used to compare the spectra of
// the array's input and output.
//
// The core is a radix-2^2 single-delay-feedback pipeline, the usual
// streaming form of a radix-4 FFT: four stages, each a pair of radix-2
// butterflies (sdf_bf2, feedback delays N/2 and N/4 of the stage size N =
// 256, 64, 16, 4) followed by a twiddle multiplier. The second butterfly of
// a stage turns its input by -j where the radix-4 butterfly needs it, so
// only the three inter-stage multipliers are general. Every butterfly
// halves its result, so the unit returns the DFT of x/256,
//   X[k] = (1/256) * sum_n x[n] * exp(-j*2*pi*n*k/256).
//
// Samples stream in one per clock and results stream out one per clock,
// 255 cycles later, in bit-reversed order; a 256-word buffer puts them back
// in natural order. Let g count cycles from `start` (g = 0 takes sample 0).
// Stage s (size N = 256 >> 2s) sees its first sample at g = 256 - N; its
// first butterfly adds when bit log2(N)-1 of its sample count is 1, its
// second when bit log2(N)-2 is 1 and multiplies by -j when in addition bit
// log2(N)-1 is 1; its multiplier applies W^(n3*(k1 + 2*k2)*256/N), where
// the sample count is k1*N/2 + k2*N/4 + n3.
//
// Timing: with `start` high the sample on `in_sample` is sample 0, the next
// 255 cycles give samples 1..255 (one per clock); zeros follow while the
// pipeline drains. Bin 0..255 then leave in order on out_re/out_im with
// `out_valid` high, the first 512 cycles after `start`, the last 767 cycles
// after it. `busy` is high from the cycle after `start` until the last bin.
//
// The size, radix, pipelining and 1/256 scaling follow the design; the
// radix-2^2 decomposition, word widths, twiddle precision (TW bits, TW-2 of
// them fraction, computed at elaboration from cos/sin), truncating
// arithmetic and the one-frame-at-a-time control are this implementation's.
module fft256_r4 #(
  parameter int unsigned IW = 23,        // input sample width
  parameter int unsigned W  = IW + 2,    // internal and output width
  parameter int unsigned TW = 16         // twiddle width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [IW-1:0] in_sample,
  output logic                 busy,
  output logic                 out_valid,
  output logic [7:0]           out_idx,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im
);
  localparam int unsigned N      = 256;
  localparam int unsigned LAT    = N - 1;   // pipeline latency
  localparam int unsigned NSTAGE = 4;

  typedef logic signed [TW-1:0] tw_tab_t [N];

  function automatic tw_tab_t make_tab(bit is_sin);
    tw_tab_t t;
    real     ang, v;
    for (int e = 0; e < int'(N); e++) begin
      ang  = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      v    = is_sin ? $sin(ang) : $cos(ang);
      t[e] = TW'($rtoi(v * real'(1 << (TW - 2)) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam tw_tab_t COS_T = make_tab(1'b0);
  localparam tw_tab_t SIN_T = make_tab(1'b1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_t;

  state_t     state;
  logic [9:0] g;          // cycles since start while running
  logic [7:0] ocnt;       // output bin counter
  logic       run;        // pipeline advances this cycle

  assign run = (state == S_IDLE && start) || state == S_RUN;

  // ------------------------------------------------------------ pipeline
  logic signed [W-1:0] st_re [NSTAGE+1];
  logic signed [W-1:0] st_im [NSTAGE+1];
  logic [7:0]          gc;  // sample count of the pipeline input

  assign gc       = (state == S_IDLE) ? 8'd0 : g[7:0];
  assign st_re[0] = (state == S_IDLE || g < 10'd256) ? W'(in_sample) : '0;
  assign st_im[0] = '0;

  for (genvar s = 0; s < int'(NSTAGE); s++) begin : g_stage
    localparam int unsigned NS  = N >> (2 * s);
    localparam int unsigned LG  = 8 - 2 * s;          // log2(NS)
    localparam int unsigned L1  = N - NS;             // first butterfly
    localparam int unsigned L2  = N - NS / 2;         // second butterfly
    localparam int unsigned LM  = N - NS / 4;         // multiplier

    logic [7:0] m1, m2;
    logic signed [W-1:0] a_re, a_im, b_re, b_im;

    assign m1 = gc - 8'(L1);
    assign m2 = gc - 8'(L2);

    sdf_bf2 #(.D(NS / 2), .W(W)) u_bf1 (
      .clk(clk), .rst_n(rst_n), .en(run), .ctrl(m1[LG-1]), .rot(1'b0),
      .in_re(st_re[s]), .in_im(st_im[s]), .out_re(a_re), .out_im(a_im)
    );
    sdf_bf2 #(.D(NS / 4), .W(W)) u_bf2 (
      .clk(clk), .rst_n(rst_n), .en(run), .ctrl(m2[LG-2]), .rot(m2[LG-2] & m2[LG-1]),
      .in_re(a_re), .in_im(a_im), .out_re(b_re), .out_im(b_im)
    );

    if (s < int'(NSTAGE) - 1) begin : g_mult
      logic [7:0]            mm, n3, kk, e;
      assign mm = gc - 8'(LM);
      logic signed [W+TW-1:0] pr, pi;
      always_comb begin
        n3 = mm & 8'(NS / 4 - 1);
        kk = {6'd0, mm[LG-2], mm[LG-1]};                 // k1 + 2*k2
        e  = 8'(n3 * kk * 8'(N / NS));
        // (b_re + j b_im) * (cos - j sin)
        pr = (W+TW)'(b_re) * (W+TW)'(COS_T[e]) + (W+TW)'(b_im) * (W+TW)'(SIN_T[e]);
        pi = (W+TW)'(b_im) * (W+TW)'(COS_T[e]) - (W+TW)'(b_re) * (W+TW)'(SIN_T[e]);
      end
      assign st_re[s+1] = W'(pr >>> (TW - 2));
      assign st_im[s+1] = W'(pi >>> (TW - 2));
    end else begin : g_last
      assign st_re[s+1] = b_re;
      assign st_im[s+1] = b_im;
    end
  end

  // ------------------------------------------------ bit-reversal buffer
  logic signed [W-1:0] buf_re [N];
  logic signed [W-1:0] buf_im [N];
  logic [7:0]          m_out;

  assign m_out = 8'(g - 10'(LAT));

  always_ff @(posedge clk) begin
    if (state == S_RUN && g >= 10'(LAT) && g < 10'(LAT + N)) begin
      buf_re[{m_out[0], m_out[1], m_out[2], m_out[3], m_out[4], m_out[5], m_out[6], m_out[7]}] <= st_re[NSTAGE];
      buf_im[{m_out[0], m_out[1], m_out[2], m_out[3], m_out[4], m_out[5], m_out[6], m_out[7]}] <= st_im[NSTAGE];
    end
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      g     <= '0;
      ocnt  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          g     <= 10'd1;
        end
        S_RUN: begin
          g <= g + 10'd1;
          if (g == 10'(2 * N - 1)) begin
            state <= S_OUT;
            ocnt  <= '0;
          end
        end
        S_OUT: begin
          ocnt <= ocnt + 8'd1;
          if (ocnt == 8'(N - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_idx   = ocnt;
  assign out_re    = buf_re[ocnt];
  assign out_im    = buf_im[ocnt];
endmodule
