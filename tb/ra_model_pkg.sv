// ra_model_pkg: cycle-level reference model of the reconfigurable array,
// used by the testbenches to predict y, the saturation count and the number
// of active CALUs. The arithmetic is written on plain integers (range checks
// instead of bit tricks) so that it does not share code with the RTL.
package ra_model_pkg;
  import ehw_pkg::*;

  localparam int MMAX = 524287;    // 2**19 - 1
  localparam int MMIN = -524288;   // -2**19

  typedef struct {
    int  p;
    int  m;
  } smp_t;

  // Place an exact result r with exponent flag e into the hybrid format.
  function automatic void fit(int r, int e, output smp_t o, output bit ovf, output bit sat);
    ovf = 0;
    sat = 0;
    if (r >= MMIN && r <= MMAX) begin
      o.p = e; o.m = r;
    end else if (e == 0) begin
      o.p = 1; o.m = r >>> 3; ovf = 1;
    end else begin
      o.p = 1; o.m = (r < 0) ? MMIN : MMAX; sat = 1;
    end
  endfunction

  function automatic void ref_addsub(smp_t a, smp_t b, bit sub, output smp_t o,
                                     output bit ovf, output bit sat);
    int e, av, bv;
    e  = (a.p != 0 || b.p != 0) ? 1 : 0;
    av = (e == 1 && a.p == 0) ? (a.m >>> 3) : a.m;
    bv = (e == 1 && b.p == 0) ? (b.m >>> 3) : b.m;
    fit(sub ? av - bv : av + bv, e, o, ovf, sat);
  endfunction

  function automatic void ref_shift(smp_t a, int op, output smp_t o,
                                    output bit ovf, output bit sat);
    ovf = 0;
    sat = 0;
    o   = a;
    case (op)
      1: fit(a.m * 2, a.p, o, ovf, sat);
      2: o.m = a.m >>> 1;
      3: o.m = a.m >>> 2;
      default: ;
    endcase
  endfunction

  function automatic longint value_of(smp_t s);
    return (s.p != 0) ? longint'(s.m) * 8 : longint'(s.m);
  endfunction

  class ra_model #(int NC = 12, int RE = 5);
    col_cfg_t ccfg [NC];
    mux_cfg_t mcfg [NC];
    mux_sel_t fsel [2];
    bit       fsub;
    bit       act  [NC][4];
    smp_t     hist [NC][4][3];   // last three CALU results, newest first
    smp_t     regs [NC][6];      // register columns
    smp_t     y;
    int       sat_count;
    int       n_active;
    int       n_sat_cycles, n_ovf_cycles;

    function new();
      foreach (hist[c, r, d]) hist[c][r][d] = '{0, 0};
      foreach (regs[c, k]) regs[c][k] = '{0, 0};
      y = '{0, 0};
      sat_count = 0;
      n_sat_cycles = 0;
      n_ovf_cycles = 0;
      set_cfg('0);
    endfunction

    // Unpack a configuration word: {cols, muxes of columns NC-1..1, fsel, fsub}.
    function void set_cfg(logic [cfg_width(NC)-1:0] w);
      int pos;
      pos = cfg_width(NC);
      for (int c = NC - 1; c >= 0; c--) begin
        pos -= COL_CFG_W;
        ccfg[c] = w[pos +: COL_CFG_W];
      end
      for (int c = NC - 1; c >= 1; c--) begin
        pos -= MUX_CFG_W;
        mcfg[c] = w[pos +: MUX_CFG_W];
      end
      mcfg[0] = '0;
      fsel[1] = w[4:3];
      fsel[0] = w[2:1];
      fsub    = w[0];
      // activity: walk back from the output CALU
      foreach (act[c, r]) act[c][r] = 0;
      act[NC-1][fsel[0]] = 1;
      act[NC-1][fsel[1]] = 1;
      for (int c = NC - 1; c >= 1; c--) begin
        if (act[c][0]) begin act[c-1][mcfg[c][0]] = 1; act[c-1][mcfg[c][1]] = 1; end
        if (act[c][1]) act[c-1][mcfg[c][2]] = 1;
        if (act[c][2]) begin act[c-1][mcfg[c][3]] = 1; act[c-1][mcfg[c][4]] = 1; end
        if (act[c][3]) act[c-1][mcfg[c][5]] = 1;
      end
      n_active = 1;
      foreach (act[c, r]) n_active += act[c][r];
    endfunction

    // One clock edge with input sample x; load = configuration applied at it.
    function void step(int x, bit load, logic [cfg_width(NC)-1:0] w);
      smp_t in [6], out [NC][4], res [NC][4], nreg [NC][6], fy;
      bit   ov, sa, any_sat, any_ovf;
      int   n_sat;
      int   dl;
      n_sat = 0; any_sat = 0; any_ovf = 0;
      for (int c = 0; c < NC; c++) begin
        for (int k = 0; k < 6; k++) begin
          if (c == 0) in[k] = '{0, x};
          else begin
            nreg[c][k] = out[c-1][mcfg[c][k]];
            in[k] = (c % RE == 0) ? regs[c][k] : nreg[c][k];
          end
        end
        ref_addsub(in[0], in[1], ccfg[c].as0.sub, res[c][0], ov, sa);
        if (act[c][0]) begin n_sat += sa; any_sat |= sa; any_ovf |= ov; end
        ref_shift(in[2], int'(ccfg[c].lr1.op), res[c][1], ov, sa);
        if (act[c][1]) begin n_sat += sa; any_sat |= sa; any_ovf |= ov; end
        ref_addsub(in[3], in[4], ccfg[c].as2.sub, res[c][2], ov, sa);
        if (act[c][2]) begin n_sat += sa; any_sat |= sa; any_ovf |= ov; end
        ref_shift(in[5], int'(ccfg[c].lr3.op), res[c][3], ov, sa);
        if (act[c][3]) begin n_sat += sa; any_sat |= sa; any_ovf |= ov; end
        for (int r = 0; r < 4; r++) begin
          case (r)
            0: dl = ccfg[c].as0.dly;
            1: dl = ccfg[c].lr1.dly;
            2: dl = ccfg[c].as2.dly;
            default: dl = ccfg[c].lr3.dly;
          endcase
          out[c][r] = (dl == 0) ? res[c][r] : hist[c][r][dl-1];
        end
      end
      ref_addsub(out[NC-1][fsel[0]], out[NC-1][fsel[1]], fsub, fy, ov, sa);
      n_sat += sa; any_sat |= sa; any_ovf |= ov;
      if (any_sat) n_sat_cycles++;
      if (any_ovf) n_ovf_cycles++;
      // clock edge
      for (int c = 0; c < NC; c++) begin
        for (int r = 0; r < 4; r++) if (act[c][r]) begin
          hist[c][r][2] = hist[c][r][1];
          hist[c][r][1] = hist[c][r][0];
          hist[c][r][0] = res[c][r];
        end
        if (c % RE == 0 && c != 0) for (int k = 0; k < 6; k++) regs[c][k] = nreg[c][k];
      end
      y = fy;
      if (load) begin
        sat_count = 0;
        set_cfg(w);
      end else begin
        sat_count += n_sat;
        if (sat_count > 65535) sat_count = 65535;
      end
    endfunction
  endclass
endpackage
