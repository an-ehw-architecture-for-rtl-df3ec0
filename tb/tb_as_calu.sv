// tb_as_calu: checks the add/subtract CALU.
//
// Random hybrid operands, operation and delay setting are applied; the
// output must equal the reference result of the operands applied `dly`
// cycles earlier, and the ovf/sat flags must match the operation of the
// current cycle. A second instance with FIXED_DLY1 = 1 (the output CALU)
// must always delay by exactly one cycle whatever cfg.dly says.
module tb_as_calu;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  logic clk = 0, rst_n = 0, en = 1;
  as_cfg_t cfg = '0;
  hyb_t a = '0, b = '0, y, y1;
  logic ovf, sat, ovf1, sat1;

  as_calu dut (.*);
  as_calu #(.FIXED_DLY1(1'b1)) dut1 (.clk, .rst_n, .en, .cfg, .a, .b, .y(y1), .ovf(ovf1), .sat(sat1));

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
    smp_t sa_, sb_, o;
    bit ov, sa;
    foreach (hist[i]) hist[i] = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sa_ = '{int'($urandom_range(0, 1)), int'($urandom_range(0, 1048575)) - 524288};
      sb_ = '{int'($urandom_range(0, 1)), int'($urandom_range(0, 1048575)) - 524288};
      if (i % 2 == 0) begin sa_.m /= 64; sb_.m /= 64; end
      a = to_h(sa_); b = to_h(sb_);
      cfg = as_cfg_t'($urandom);
      #1;
      ref_addsub(sa_, sb_, cfg.sub, o, ov, sa);
      hist[0] = o;
      check(y == to_h(hist[cfg.dly]), "delayed result");
      check(y1 == to_h(hist[1]), "output CALU one-cycle delay");
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
