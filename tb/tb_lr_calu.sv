// tb_lr_calu: checks the left/right shift CALU.
//
// Random hybrid samples, shift kinds and delays are applied; the output must
// equal the reference shift of the sample applied `dly` cycles earlier and
// the ovf/sat flags must match the shift of the current cycle.
module tb_lr_calu;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  lr_cfg_t cfg = '0;
  hyb_t a = '0, y;
  logic ovf, sat;

  lr_calu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  smp_t hist [4];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic hyb_t to_h(smp_t s);
    return '{prot: 1'(s.p), m: DW'(s.m)};
  endfunction

  initial begin
    smp_t s, o;
    bit ov, sa;
    foreach (hist[i]) hist[i] = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      s = '{int'($urandom_range(0, 1)), int'($urandom_range(0, 1048575)) - 524288};
      if (i % 2 == 0) s.m /= 16;
      a   = to_h(s);
      cfg = lr_cfg_t'($urandom);
      #1;
      ref_shift(s, int'(cfg.op), o, ov, sa);
      hist[0] = o;
      check(y == to_h(hist[cfg.dly]), "delayed result");
      check(ovf == ov && sat == sa, "flags");
      @(posedge clk);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
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
