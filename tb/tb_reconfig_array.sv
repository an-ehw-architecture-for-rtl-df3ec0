// tb_reconfig_array: self-checking test of the 4 x 12 reconfigurable array.
//
// 1. Latency: a chain that passes x unchanged along row 1 with every delay
//    at 0 must answer an impulse after exactly 3 cycles, and with every
//    delay at 3 after exactly 39 cycles (y = 2 * x[n - latency]).
// 2. Impulse response: for random configurations an impulse followed by 39
//    zeros is applied and every output sample is compared with the model.
// 3. Random configurations are loaded while random samples (some of full
//    scale, to force rescaling and saturation) keep flowing; y, the
//    saturation count and the active-CALU count are compared every cycle
//    with the reference model of ra_model_pkg.
module tb_reconfig_array;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  localparam int NC    = 12;
  localparam int CFG_W = cfg_width(NC);

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

  int checks = 0, failures = 0;
  int seen_sat = 0, seen_ovf = 0;
  ra_model #(NC, 5) model;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Configuration with every CALU on delay `d`, no shift, add, all muxes on row 1.
  function automatic logic [CFG_W-1:0] chain_cfg(logic [1:0] d);
    col_cfg_t cc;
    mux_cfg_t mc;
    logic [CFG_W-1:0] w;
    cc = '{as0: '{dly: d, sub: 1'b0}, lr1: '{dly: d, op: SH_NONE},
           as2: '{dly: d, sub: 1'b0}, lr3: '{dly: d, op: SH_NONE}};
    mc = {NMUX{2'd1}};
    w  = '0;
    for (int c = 0; c < NC; c++) w[CFG_W-1-c*COL_CFG_W -: COL_CFG_W] = cc;
    for (int c = 1; c < NC; c++) w[CFG_W-1-NC*COL_CFG_W-(c-1)*MUX_CFG_W -: MUX_CFG_W] = mc;
    w[4:0] = {2'd1, 2'd1, 1'b0};
    return w;
  endfunction

  function automatic logic [CFG_W-1:0] rand_cfg();
    logic [CFG_W-1:0] w;
    for (int i = 0; i < CFG_W; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  // One cycle: drive at the falling edge, model the rising edge, compare after.
  task automatic cycle(int xv, bit load, logic [CFG_W-1:0] w, bit cmp);
    @(negedge clk);
    x        = DW'(xv);
    cfg_load = load;
    cfg_word = w;
    model.step(xv, load, w);
    @(posedge clk);
    #1;
    if (cmp) begin
      check(y.prot == 1'(model.y.p) && y.m == DW'(model.y.m), "y");
      check(longint'(y_value) == value_of(model.y), "y_value");
      check(int'(sat_count) == model.sat_count, "sat_count");
      check(int'(n_active) == model.n_active, "n_active");
      if (sat_any) seen_sat++;
      if (ovf_any) seen_ovf++;
    end
  endtask

  task automatic latency_test(logic [1:0] d, int expect_lat);
    int lat;
    cycle(0, 1, chain_cfg(d), 0);
    for (int i = 0; i < 45; i++) cycle(0, 0, '0, 1);
    cycle(1000, 0, '0, 1);
    lat = -1;
    for (int i = 1; i <= 45; i++) begin
      cycle(0, 0, '0, 1);
      // the edge that takes the sample in counts as cycle 1
      if (y_value == 2000 && lat < 0) lat = i + 1;
    end
    $display("latency with delays %0d: %0d cycles", d, lat);
    check(lat == expect_lat, "latency");
  endtask

  initial begin
    model = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    latency_test(2'd0, 3);
    latency_test(2'd3, 39);
    // impulse responses
    for (int n = 0; n < 20; n++) begin
      cycle(0, 1, rand_cfg(), 0);
      for (int i = 0; i < 40; i++) cycle(0, 0, '0, 1);
      cycle(4096, 0, '0, 1);
      for (int i = 0; i < 39; i++) cycle(0, 0, '0, 1);
    end
    // random streams, reconfiguring while data flows
    for (int n = 0; n < 60; n++) begin
      cycle(int'($urandom_range(0, 2000)) - 1000, 1, rand_cfg(), 1);
      for (int i = 0; i < 150; i++) begin
        int xv;
        xv = (n % 3 == 0) ? int'($urandom_range(0, 1048575)) - 524288
                          : int'($urandom_range(0, 40000)) - 20000;
        cycle(xv, 0, '0, 1);
      end
    end
    $display("cycles with a rescale: %0d, with a saturation: %0d", seen_ovf, seen_sat);
    check(seen_ovf > 0, "rescale happened");
    check(seen_sat > 0, "saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
