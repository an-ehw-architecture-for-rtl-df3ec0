// tb_ehw_system: end-to-end test of the platform at its default size
// (12 columns, 305-bit configuration, 256-point FFT).
//
// It plays the part of the evolution engine:
//  1. Loads a hand-made configuration (row 1 passes x through twelve
//     one-cycle delays, row 3 halves x and delays it by two cycles, the
//     output CALU adds them), reads the impulse response by applying an
//     impulse followed by 39 zeros, and checks the two taps: 1/2 at 5
//     cycles and 1 at 15. Only 25 CALUs are in use; the rest are gated.
//     A chain of twelve left shifts under a large input must then rescale
//     and saturate to the largest representable value.
//  2. Takes the spectrum of an input frame once (220 random samples, then
//     36 zeros), then for several random configurations ("generations")
//     feeds the same frame, takes the spectrum of y, and checks both
//     spectra against a floating-point DFT of the samples the FFT saw.
//     One generation uses a full-scale frame so that rescaling and
//     saturation occur; the saturation count is checked against the model.
//  3. Every cycle, y, the saturation count and the active-CALU count are
//     compared with the reference model.
// Each mechanism (reconfiguration under data, rescale, saturation, clock
// gating, FFT of x, FFT of y, minimum 3-cycle path) is counted, and a
// mechanism that never happened counts as a failure.
module tb_ehw_system;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  localparam int NC    = 12;
  localparam int CFG_W = cfg_width(NC);
  localparam int FW    = DW + EXP_SHIFT + 2;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] x = '0;
  hyb_t y;
  logic signed [DW+EXP_SHIFT-1:0] y_value;
  logic cfg_load = 0;
  logic [CFG_W-1:0] cfg_word = '0;
  logic [15:0] sat_count;
  logic [$clog2(NC*NROWS+2)-1:0] n_active;
  logic [NC-1:0][NROWS-1:0] active;
  logic sat_any, ovf_any;
  logic fft_start = 0, fft_src = 0;
  logic fft_busy, fft_valid;
  logic [7:0] fft_idx;
  logic signed [FW-1:0] fft_re, fft_im;

  ehw_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reconf = 0, n_ovf = 0, n_sat = 0, n_gated = 0, n_fft_x = 0, n_fft_y = 0;
  ra_model #(NC, 5) model;

  // FFT bookkeeping
  int  cap_left = 0;
  bit  cap_src = 0;
  int  cap_pos = 0;
  int  cap_frame [256];
  int  got_re [256], got_im [256];
  int  n_got = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [CFG_W-1:0] pack_cfg(col_cfg_t cc [NC], mux_cfg_t mc [NC],
                                                  mux_sel_t f0, mux_sel_t f1, bit fsub);
    logic [CFG_W-1:0] w;
    for (int c = 0; c < NC; c++) w[CFG_W-1-(NC-1-c)*COL_CFG_W -: COL_CFG_W] = cc[c];
    for (int c = 1; c < NC; c++) w[CFG_W-1-NC*COL_CFG_W-(NC-1-c)*MUX_CFG_W -: MUX_CFG_W] = mc[c];
    w[4:0] = {f1, f0, fsub};
    return w;
  endfunction

  function automatic logic [CFG_W-1:0] rand_cfg();
    logic [CFG_W-1:0] w;
    for (int i = 0; i < CFG_W; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  task automatic cycle(int xv, bit load = 0, logic [CFG_W-1:0] w = '0,
                       bit start = 0, bit src = 0);
    @(negedge clk);
    x         = DW'(xv);
    cfg_load  = load;
    cfg_word  = w;
    fft_start = start;
    fft_src   = src;
    if (start) begin cap_left = 256; cap_pos = 0; n_got = 0; cap_src = src; end
    if (cap_left > 0) begin
      cap_frame[cap_pos] = cap_src ? int'(y_value) : xv;
      cap_pos++;
      cap_left--;
    end
    if (load) n_reconf++;
    model.step(xv, load, w);
    @(posedge clk);
    #1;
    check(y.prot == 1'(model.y.p) && y.m == DW'(model.y.m), "y");
    check(int'(sat_count) == model.sat_count, "sat_count");
    check(int'(n_active) == model.n_active, "n_active");
    if (ovf_any) n_ovf++;
    if (sat_any) n_sat++;
    if (n_active < 49) n_gated++;
    if (fft_valid) begin
      got_re[fft_idx] = int'(fft_re);
      got_im[fft_idx] = int'(fft_im);
      n_got++;
    end
  endtask

  // Compare the 256 collected bins with a DFT of the captured frame.
  task automatic check_spectrum(string name, output real mag2 [128]);
    real er, ei, tol, maxabs;
    int bad;
    maxabs = 1.0;
    foreach (cap_frame[n]) if (rabs(real'(cap_frame[n])) > maxabs) maxabs = rabs(real'(cap_frame[n]));
    tol = 6.0 + maxabs * 2.0e-5;
    bad = 0;
    check(n_got == 256, {name, ": 256 bins"});
    for (int k = 0; k < 256; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 256; n++) begin
        er += real'(cap_frame[n]) * $cos(2.0 * PI * real'(n * k) / 256.0);
        ei -= real'(cap_frame[n]) * $sin(2.0 * PI * real'(n * k) / 256.0);
      end
      er /= 256.0; ei /= 256.0;
      if (rabs(real'(got_re[k]) - er) > tol || rabs(real'(got_im[k]) - ei) > tol) bad++;
      if (k < 128) mag2[k] = real'(got_re[k]) ** 2 + real'(got_im[k]) ** 2;
    end
    check(bad == 0, {name, ": bins match the DFT"});
  endtask

  task automatic wait_fft();
    while (fft_busy || fft_start) cycle(0);
  endtask

  initial begin
    col_cfg_t cc [NC];
    mux_cfg_t mc [NC];
    logic [CFG_W-1:0] hand;
    int frame [256];
    int h [40];
    real xm2 [128], ym2 [128], fit;

    model = new();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. hand-made two-tap filter and its impulse response
    for (int c = 0; c < NC; c++) begin
      cc[c] = '{as0: '{dly: 2'd0, sub: 1'b0}, lr1: '{dly: 2'd1, op: SH_NONE},
                as2: '{dly: 2'd0, sub: 1'b0}, lr3: '{dly: 2'd0, op: SH_NONE}};
      mc[c] = {2'd3, 2'd0, 2'd0, 2'd1, 2'd0, 2'd0};
    end
    cc[0].lr3 = '{dly: 2'd2, op: SH_R1};
    hand = pack_cfg(cc, mc, 2'd1, 2'd3, 1'b0);
    cycle(0, 1, hand);
    for (int i = 0; i < 40; i++) cycle(0);
    check(n_active == 25, "two-tap filter uses 25 CALUs");
    cycle(4096);
    for (int i = 1; i < 40; i++) begin
      cycle(0);
      h[i] = int'(y_value);   // output after the (i+1)-th edge from the impulse
    end
    for (int i = 1; i < 40; i++) begin
      if (i + 1 == 5)       check(h[i] == 2048, "tap 1/2 at 5 cycles");
      else if (i + 1 == 15) check(h[i] == 4096, "tap 1 at 15 cycles");
      else                  check(h[i] == 0, "other taps zero");
    end

    // ---- a chain of twelve left shifts: a sustained large input must
    //      first set the protection bit and then saturate
    for (int c = 0; c < NC; c++) cc[c].lr1 = '{dly: 2'd0, op: SH_L1};
    cycle(0, 1, pack_cfg(cc, mc, 2'd1, 2'd1, 1'b0));
    for (int i = 0; i < 20; i++) cycle(100000);
    check(sat_count > 0, "left-shift chain saturates");
    check(y.prot && y.m == 20'sh7FFFF, "saturated output is the largest value");

    // ---- 2. spectral evolution loop
    foreach (frame[n]) frame[n] = (n < 220) ? int'($urandom_range(0, 200000)) - 100000 : 0;
    cycle(frame[0], 0, '0, 1, 0);
    for (int n = 1; n < 256; n++) cycle(frame[n]);
    wait_fft();
    check_spectrum("X", xm2);
    n_fft_x++;
    for (int g = 0; g < 6; g++) begin
      int scale;
      scale = (g == 3) ? 5 : 1;   // a full-scale frame forces rescale and saturation
      cycle(0, 1, rand_cfg());
      for (int i = 0; i < 40; i++) cycle(0);
      // y lags x by at least 3 cycles; start the capture with the first input
      cycle(frame[0] * scale, 0, '0, 1, 1);
      for (int n = 1; n < 256; n++) cycle(frame[n] * scale);
      wait_fft();
      check_spectrum("Y", ym2);
      n_fft_y++;
      fit = 0.0;
      for (int k = 0; k < 128; k++) if (xm2[k] > 0.0) fit += ym2[k] / xm2[k];
      $display("generation %0d: active CALUs %0d, saturations %0d, mean |F|^2 %f",
               g, n_active, sat_count, fit / 128.0);
    end

    // ---- mechanism coverage
    $display("reconfigurations %0d, rescale cycles %0d, saturation cycles %0d, gated cycles %0d, FFT(x) %0d, FFT(y) %0d",
             n_reconf, n_ovf, n_sat, n_gated, n_fft_x, n_fft_y);
    check(n_reconf > 1, "reconfiguration happened");
    check(n_ovf > 0, "rescale happened");
    check(n_sat > 0, "saturation happened");
    check(n_gated > 0, "clock gating happened");
    check(n_fft_x > 0 && n_fft_y > 0, "both spectra taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
