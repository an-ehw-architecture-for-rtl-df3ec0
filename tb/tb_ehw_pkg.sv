// tb_ehw_pkg: checks the hybrid arithmetic functions of ehw_pkg.
//
// Directed cases cover plain addition, subtraction, rescaling on overflow
// (protection bit set, mantissa shifted right by 3), alignment of operands
// with different exponents, and saturation of protected samples; random
// cases compare against the integer reference of ra_model_pkg. Also checks
// the configuration word length of the 12-column array (305 bits).
module tb_ehw_pkg;
  import ehw_pkg::*;
  import ra_model_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic hyb_t mk(bit p, int m);
    return '{prot: p, m: DW'(m)};
  endfunction

  initial begin
    hyb_res_t r;
    smp_t o;
    bit ov, sa;
    r = hyb_addsub(mk(0, 100), mk(0, 23), 1'b0);
    check(r.v == mk(0, 123) && !r.ovf && !r.sat, "100+23");
    r = hyb_addsub(mk(0, 100), mk(0, 23), 1'b1);
    check(r.v == mk(0, 77), "100-23");
    r = hyb_addsub(mk(0, 400000), mk(0, 400000), 1'b0);
    check(r.v == mk(1, 100000) && r.ovf && !r.sat, "rescale 800000");
    r = hyb_addsub(mk(0, -400000), mk(0, 400001), 1'b1);
    check(r.v == mk(1, -100001) && r.ovf, "rescale -800001 (floor)");
    r = hyb_addsub(mk(1, 1000), mk(0, 80), 1'b0);
    check(r.v == mk(1, 1010) && !r.ovf, "align exponents");
    r = hyb_addsub(mk(1, 500000), mk(1, 100000), 1'b0);
    check(r.v == mk(1, 524287) && r.sat, "saturate high");
    r = hyb_addsub(mk(1, -500000), mk(0, 800000 / 2), 1'b1);
    check(r.v == mk(1, -524288) && r.sat, "saturate low");
    r = hyb_shift(mk(0, 300000), SH_L1);
    check(r.v == mk(1, 75000) && r.ovf, "left shift rescale");
    r = hyb_shift(mk(1, 300000), SH_L1);
    check(r.v == mk(1, 524287) && r.sat, "left shift saturate");
    r = hyb_shift(mk(0, -7), SH_R1);
    check(r.v == mk(0, -4), "right shift 1");
    r = hyb_shift(mk(1, 13), SH_R2);
    check(r.v == mk(1, 3), "right shift 2");
    r = hyb_shift(mk(1, 13), SH_NONE);
    check(r.v == mk(1, 13), "no shift");
    check(hyb_value(mk(1, -3)) == -24, "value with exponent");
    check(cfg_width(12) == 305, "config word length");
    for (int i = 0; i < 2000; i++) begin
      smp_t a, b;
      bit sub;
      int op;
      a = '{int'($urandom_range(0, 1)), int'($urandom_range(0, 1048575)) - 524288};
      b = '{int'($urandom_range(0, 1)), int'($urandom_range(0, 1048575)) - 524288};
      sub = 1'($urandom);
      op  = int'($urandom_range(0, 3));
      r = hyb_addsub(mk(1'(a.p), a.m), mk(1'(b.p), b.m), sub);
      ref_addsub(a, b, sub, o, ov, sa);
      check(r.v == mk(1'(o.p), o.m) && r.ovf == ov && r.sat == sa, "random add/sub");
      r = hyb_shift(mk(1'(a.p), a.m), shift_op_t'(op));
      ref_shift(a, op, o, ov, sa);
      check(r.v == mk(1'(o.p), o.m) && r.ovf == ov && r.sat == sa, "random shift");
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
