// tb_calu_column: checks one column of four CALUs.
//
// Random inputs and random column configurations (delays set to 0 so the
// result is combinational) are applied; row 0 must compute in0 +/- in1,
// row 1 shift in2, row 2 compute in3 +/- in4 and row 3 shift in5, each as
// the integer reference predicts, flags included. A second phase uses delay
// 1 on every row and checks the result one cycle later, and that a row
// whose enable is low holds its output.
module tb_calu_column;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NROWS-1:0] en = '1;
  col_cfg_t cfg = '0;
  hyb_t [NMUX-1:0] in = '0;
  hyb_t [NROWS-1:0] out;
  logic [NROWS-1:0] ovf, sat;

  calu_column dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic smp_t to_s(hyb_t h);
    return '{int'(h.prot), int'(h.m)};
  endfunction
  function automatic hyb_t to_h(smp_t s);
    return '{prot: 1'(s.p), m: DW'(s.m)};
  endfunction

  task automatic predict(output hyb_t [NROWS-1:0] exp_v, output logic [NROWS-1:0] ev, output logic [NROWS-1:0] es);
    smp_t o;
    bit ov, sa;
    ref_addsub(to_s(in[0]), to_s(in[1]), cfg.as0.sub, o, ov, sa); exp_v[0] = to_h(o); ev[0] = ov; es[0] = sa;
    ref_shift(to_s(in[2]), int'(cfg.lr1.op), o, ov, sa);          exp_v[1] = to_h(o); ev[1] = ov; es[1] = sa;
    ref_addsub(to_s(in[3]), to_s(in[4]), cfg.as2.sub, o, ov, sa); exp_v[2] = to_h(o); ev[2] = ov; es[2] = sa;
    ref_shift(to_s(in[5]), int'(cfg.lr3.op), o, ov, sa);          exp_v[3] = to_h(o); ev[3] = ov; es[3] = sa;
  endtask

  initial begin
    hyb_t [NROWS-1:0] ev_, held;
    logic [NROWS-1:0] eo, es;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int k = 0; k < int'(NMUX); k++) in[k] = hyb_t'($urandom);
      cfg = col_cfg_t'($urandom);
      cfg.as0.dly = 0; cfg.lr1.dly = 0; cfg.as2.dly = 0; cfg.lr3.dly = 0;
      #1;
      predict(ev_, eo, es);
      check(out == ev_, "combinational results");
      check(ovf == eo && sat == es, "flags");
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int k = 0; k < int'(NMUX); k++) in[k] = hyb_t'($urandom);
      cfg = col_cfg_t'($urandom);
      cfg.as0.dly = 1; cfg.lr1.dly = 1; cfg.as2.dly = 1; cfg.lr3.dly = 1;
      en = 4'($urandom);
      held = out;
      #1;
      predict(ev_, eo, es);
      @(posedge clk); #1;
      for (int r = 0; r < int'(NROWS); r++)
        check(out[r] == (en[r] ? ev_[r] : held[r]), "delayed result / gated hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
