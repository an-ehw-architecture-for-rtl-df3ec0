// tb_ga_coef: the coefficient-evolution workload on the full-size array.
//
// A genetic algorithm (ga_pkg) evolves configuration words whose impulse
// response approaches a target coefficient set. Two runs are made: the 8-tap
// lowpass -0.125 -0.129 -0.203 -0.254 -0.207 -0.203 0.129 -0.078 for 3500
// generations, then the 12-tap highpass 0.0098 -0.0117 -0.0215 -0.0019
// -0.0058 -0.1152 0.6328 -0.2520 -0.2340 -0.1289 0.0313 0.0313 for 6300
// generations (the generation counts the original searches needed). Every
// candidate is scored on the hardware: load it, flush with 39 zeros, apply
// an impulse of 2**15 followed by 39 zeros, and read the response at
// latencies 3..38, counting taps from the first non-zero one (a pure delay
// is free). The fitness is the sum over the 36 taps of
// (1000*ideal - 1000*evolved)**2, with the evolved taps rounded to
// multiples of 1/1000 (so that a tap counts only if it is at least 0.0005),
// plus a penalty of 10**5 per tap of difference in filter length (first to
// last non-zero tap) and 10**3 per saturation.
//
// Checks: every output sample against the reference model, the elitist
// best fitness never gets worse, the best fitness improves over each run,
// and re-scoring the best configuration gives the same fitness.
module tb_ga_coef;
  import ehw_pkg::*;
  import ra_model_pkg::*;
  import ga_pkg::*;

  localparam int NC          = 12;
  localparam int CFG_W       = cfg_width(NC);
  localparam int GEN_LP      = 3500;   // generations the original lowpass run needed
  localparam int GEN_HP      = 6300;   // generations the original highpass run needed
  localparam int AMP         = 32768;
  localparam real LOWPASS [8]   = '{-0.125, -0.129, -0.203, -0.254, -0.207, -0.203, 0.129, -0.078};
  localparam real HIGHPASS [12] = '{0.0098, -0.0117, -0.0215, -0.0019, -0.0058, -0.1152,
                                    0.6328, -0.2520, -0.2340, -0.1289, 0.0313, 0.0313};

  logic clk = 0, rst_n = 0;
  logic cfg_load = 0;
  logic [CFG_W-1:0] cfg_word = '0;
  logic signed [DW-1:0] x = '0;
  hyb_t y;
  logic signed [DW+EXP_SHIFT-1:0] y_value;
  logic [15:0] sat_count;
  logic sat_any, ovf_any;
  logic [NC-1:0][NROWS-1:0] active;
  logic [$clog2(NC*NROWS+2)-1:0] n_active;

  reconfig_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, mismatches = 0;
  real last_taps [12];
  real ideal [12];       // target taps of the current run
  int  ntaps;            // and their number
  ra_model #(NC, 5) model;
  ga #(CFG_W) g;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(int xv, bit load = 0, logic [CFG_W-1:0] w = '0);
    @(negedge clk);
    x = DW'(xv);
    cfg_load = load;
    cfg_word = w;
    model.step(xv, load, w);
    @(posedge clk);
    #1;
    if (!(y.prot == 1'(model.y.p) && y.m == DW'(model.y.m) && int'(sat_count) == model.sat_count))
      mismatches++;
  endtask

  task automatic score(logic [CFG_W-1:0] w, output real f);
    real ev [36];
    int  first, last, sats;
    cycle(0, 1, w);
    for (int i = 0; i < 39; i++) cycle(0);
    cycle(AMP);
    for (int i = 1; i <= 38; i++) begin
      cycle(0);
      // after the (i+1)-th edge from the impulse: latency i + 1
      // coefficients are compared on a grid of 1/1000
      if (i + 1 >= 3) ev[i - 2] = real'($rtoi(1000.0 * real'(y_value) / real'(AMP)
                                          + ((y_value < 0) ? -0.5 : 0.5))) / 1000.0;
    end
    cycle(0);
    sats = int'(sat_count);
    // the evolved filter starts at its first non-zero tap
    first = -1;
    last = -1;
    for (int t = 0; t < 36; t++)
      if (ev[t] != 0.0) begin
        if (first < 0) first = t;
        last = t;
      end
    if (first < 0) first = 0;
    f = 0.0;
    for (int t = 0; t < 36; t++) begin
      real id, e;
      id = (t < ntaps) ? ideal[t] : 0.0;
      e  = (t + first < 36) ? ev[t + first] : 0.0;
      f += (1000.0 * id - 1000.0 * e) ** 2;
    end
    if (last < 0) f += 1.0e5 * real'(ntaps);
    else f += 1.0e5 * real'((last - first + 1 > ntaps) ? (last - first + 1 - ntaps)
                                                       : (ntaps - (last - first + 1)));
    f += 1.0e3 * real'(sats);
    for (int t = 0; t < 12; t++) last_taps[t] = (t + first < 36) ? ev[t + first] : 0.0;
  endtask

  task automatic run_evolution(bit highpass, int generations);
    real   first_best, prev_best, again;
    string name, taps;
    name  = highpass ? "highpass" : "lowpass";
    ntaps = highpass ? 12 : 8;
    for (int t = 0; t < 12; t++)
      ideal[t] = highpass ? HIGHPASS[t] : ((t < 8) ? LOWPASS[t] : 0.0);
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
      if (gen % 500 == 0) $display("%s generation %0d: best fitness %0.1f", name, gen, g.fit[0]);
    end
    score(g.pop[0], again);
    check(again == g.fit[0], "re-scoring the best gives the same fitness");
    taps = "";
    for (int t = 0; t < ntaps; t++) taps = {taps, $sformatf(" %0.3f", last_taps[t])};
    $display("%s best filter, first %0d taps:%s", name, ntaps, taps);
    check(g.fit[0] < first_best, "fitness improved");
    $display("%s best fitness: initial %0.1f, final %0.1f", name, first_best, g.fit[0]);
  endtask

  initial begin
    model = new();
    g = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_evolution(1'b0, GEN_LP);
    run_evolution(1'b1, GEN_HP);
    check(mismatches == 0, "array matches the reference model on every cycle");
    check(g.n_crossovers > 0, "crossover happened");
    $display("crossovers %0d, mutations %0d", g.n_crossovers, g.n_mutations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
