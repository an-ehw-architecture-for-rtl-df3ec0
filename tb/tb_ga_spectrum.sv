// tb_ga_spectrum: the frequency-response evolution workload on the full
// platform (array plus FFT) at its default size.
//
// The input frame is 220 random samples followed by 36 zeros; its spectrum
// X is taken once with the FFT (fft_src = 0). A genetic algorithm (ga_pkg)
// then evolves configuration words, first for a lowpass, then for a highpass. Each candidate is loaded, the array is
// flushed with 40 zeros, the frame is replayed and the FFT takes the
// spectrum Y of the output (fft_src = 1). The evolved squared magnitude is
// |F|^2 = (Yre^2 + Yim^2) / (Xre^2 + Xim^2) over bins 0..127, and the
// fitness is the sum of |ideal - evolved| over those bins plus 1 per
// saturation. The ideal response is the lowpass specification with
// sampling frequency 1: passband up to 0.1 (|F|^2 = 1, bins 0..25),
// stopband from 0.15 with 20 dB attenuation (|F|^2 = 0.01, bins 39..127);
// the transition bins are not scored. A second run targets the highpass
// specification: stopband up to 0.01 (|F|^2 = 0.01, bins 0..2), passband
// from 0.1 (|F|^2 = 1, bins 26..127). The runs last 72 and 204
// generations, the numbers the original searches needed.
//
// Checks: the FFT of x against a floating-point DFT; every output sample
// against the reference model; elitism never loses the best; the best
// fitness improves (or, for the highpass, is at most 3.5, the level of an
// all-pass, which the 3-bin stopband hardly penalises); re-scoring the
// best gives the same fitness, and its output spectrum matches a DFT of the
// output samples.
module tb_ga_spectrum;
  import ehw_pkg::*;
  import ra_model_pkg::*;
  import ga_pkg::*;

  localparam int NC          = 12;
  localparam int CFG_W       = cfg_width(NC);
  localparam int FW          = DW + EXP_SHIFT + 2;
  localparam int GENERATIONS = 72;
  localparam real PI         = 3.14159265358979323846;

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

  int checks = 0, failures = 0, mismatches = 0;
  ra_model #(NC, 5) model;
  ga #(CFG_W) g;

  int  frame [256];
  int  cap [256];      // samples seen by the FFT in the last capture
  int  cap_pos = 256;
  bit  cap_src = 0;
  real bre [256], bim [256];
  real xm2 [128];
  real ideal [128];
  bit  scored [128];

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

  task automatic cycle(int xv, bit load = 0, logic [CFG_W-1:0] w = '0, bit start = 0, bit src = 0);
    @(negedge clk);
    x = DW'(xv);
    cfg_load = load;
    cfg_word = w;
    fft_start = start;
    fft_src = src;
    if (start) begin cap_pos = 0; cap_src = src; end
    if (cap_pos < 256) begin
      cap[cap_pos] = cap_src ? int'(y_value) : xv;
      cap_pos++;
    end
    model.step(xv, load, w);
    @(posedge clk);
    #1;
    if (!(y.prot == 1'(model.y.p) && y.m == DW'(model.y.m) && int'(sat_count) == model.sat_count))
      mismatches++;
    if (fft_valid) begin
      bre[fft_idx] = real'(fft_re);
      bim[fft_idx] = real'(fft_im);
    end
  endtask

  // Play the frame and collect the spectrum of x (src 0) or y (src 1).
  task automatic spectrum(bit src);
    cycle(frame[0], 0, '0, 1, src);
    for (int n = 1; n < 256; n++) cycle(frame[n]);
    while (fft_busy) cycle(0);
  endtask

  task automatic check_dft(string name);
    real er, ei, tol, maxabs;
    int bad;
    maxabs = 1.0;
    foreach (cap[n]) if (rabs(real'(cap[n])) > maxabs) maxabs = rabs(real'(cap[n]));
    tol = 6.0 + maxabs * 2.0e-5;
    bad = 0;
    for (int k = 0; k < 256; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 256; n++) begin
        er += real'(cap[n]) * $cos(2.0 * PI * real'(n * k) / 256.0);
        ei -= real'(cap[n]) * $sin(2.0 * PI * real'(n * k) / 256.0);
      end
      if (rabs(bre[k] - er / 256.0) > tol || rabs(bim[k] - ei / 256.0) > tol) bad++;
    end
    check(bad == 0, {name, " spectrum matches the DFT"});
  endtask

  task automatic score(logic [CFG_W-1:0] w, output real f);
    cycle(0, 1, w);
    for (int i = 0; i < 40; i++) cycle(0);
    spectrum(1'b1);
    f = real'(sat_count);
    for (int k = 0; k < 128; k++)
      if (scored[k] && xm2[k] > 0.0) f += rabs(ideal[k] - (bre[k] ** 2 + bim[k] ** 2) / xm2[k]);
  endtask

  // Evolve towards the lowpass (highpass = 0) or highpass specification.
  task automatic run_evolution(bit highpass, int generations);
    real first_best, prev_best, again;
    string name;
    name = highpass ? "highpass" : "lowpass";
    for (int k = 0; k < 128; k++) begin
      if (highpass) begin
        scored[k] = (k <= 2) || (k >= 26);
        ideal[k]  = (k <= 2) ? 0.01 : 1.0;
      end else begin
        scored[k] = (k <= 25) || (k >= 39);
        ideal[k]  = (k <= 25) ? 1.0 : 0.01;
      end
    end
    g.init();
    for (int i = 0; i < 50; i++) score(g.pop[i], g.fit[i]);
    first_best = g.fit[g.best_index()];
    prev_best = first_best;
    for (int gen = 1; gen <= generations; gen++) begin
      g.make_children();
      for (int i = 50; i < 100; i++) score(g.pop[i], g.fit[i]);
      g.select();
      check(g.fit[0] <= prev_best, "elitism keeps the best");
      prev_best = g.fit[0];
      if (gen % 24 == 0) $display("%s generation %0d: best fitness %0.2f", name, gen, g.fit[0]);
    end
    score(g.pop[0], again);
    check(rabs(again - g.fit[0]) < 1.0e-9, "re-scoring the best gives the same fitness");
    check_dft({name, " output"});
    // The highpass target scores only 3 stopband bins, so an all-pass
    // already reaches about 3; a start population that holds one may not
    // improve within the run. Either improvement or that level passes.
    check(g.fit[0] < first_best || g.fit[0] <= 3.5, "fitness improved or at all-pass level");
    $display("%s best fitness: initial %0.2f, final %0.2f after %0d generations",
             name, first_best, g.fit[0], generations);
    $display("%s best |F|^2 at f = 0, 0.01, 0.05, 0.1, 0.2, 0.3, 0.4: %0.3f %0.3f %0.3f %0.3f %0.3f %0.3f %0.3f",
             name, m2(0), m2(3), m2(13), m2(26), m2(51), m2(77), m2(102));
  endtask

  function automatic real m2(int k);
    return (bre[k] ** 2 + bim[k] ** 2) / xm2[k];
  endfunction

  initial begin
    model = new();
    g = new();
    foreach (frame[n]) frame[n] = (n < 220) ? int'($urandom_range(0, 200000)) - 100000 : 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    spectrum(1'b0);
    check_dft("input");
    for (int k = 0; k < 128; k++) xm2[k] = bre[k] ** 2 + bim[k] ** 2;

    run_evolution(1'b0, 72);
    run_evolution(1'b1, 204);
    check(mismatches == 0, "array matches the reference model on every cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
