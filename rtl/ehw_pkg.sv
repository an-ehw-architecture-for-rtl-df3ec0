// ehw_pkg: types, constants and the hybrid arithmetic shared by the
// reconfigurable FIR array.
//
// A data sample travels through the array as a 21-bit "hybrid" word: a
// 20-bit two's complement mantissa plus one protection bit. The protection
// bit is a binary exponent of 3: the sample's value is m * 2**(3*prot).
// When an operation is about to overflow 20 bits and the protection bit is
// still clear, the full-width result is shifted right arithmetically by 3
// (sign extended, three LSBs dropped) and the protection bit is set. When an
// operation would overflow a sample whose protection bit is already set, the
// result saturates to the nearest representable value. Operands with
// different exponents are aligned by shifting the unprotected one right by 3
// before an addition or subtraction. These rules follow the overflow scheme
// of the design; the bit encodings of the configuration fields below are this
// implementation's own choice.
package ehw_pkg;

  localparam int unsigned DW        = 20;  // mantissa width of the data bus
  localparam int unsigned EXP_SHIFT = 3;   // binary exponent carried by prot
  localparam int unsigned NROWS     = 4;   // CALUs per column
  localparam int unsigned NMUX      = 6;   // 4:1 muxes between two columns
  localparam int unsigned MAX_DLY   = 3;   // longest programmable CALU delay

  // Hybrid sample: protection bit and 20-bit mantissa.
  typedef struct packed {
    logic                 prot;
    logic signed [DW-1:0] m;
  } hyb_t;

  // Result of one arithmetic step with its event flags.
  typedef struct packed {
    hyb_t v;
    logic ovf;  // protection bit was set by this operation (rescale by 2**-3)
    logic sat;  // value was clipped to the representable range
  } hyb_res_t;

  // L/R CALU shift kinds (2 bits).
  typedef enum logic [1:0] {
    SH_NONE = 2'd0,
    SH_L1   = 2'd1,
    SH_R1   = 2'd2,
    SH_R2   = 2'd3
  } shift_op_t;

  // A/S CALU configuration: 2 delay bits and 1 add/subtract bit (3 bits).
  typedef struct packed {
    logic [1:0] dly;
    logic       sub;   // 0: a + b, 1: a - b
  } as_cfg_t;

  // L/R CALU configuration: 2 delay bits and 2 shift bits (4 bits).
  typedef struct packed {
    logic [1:0] dly;
    shift_op_t  op;
  } lr_cfg_t;

  // One column, top to bottom: A/S, L/R, A/S, L/R (14 bits).
  typedef struct packed {
    as_cfg_t as0;
    lr_cfg_t lr1;
    as_cfg_t as2;
    lr_cfg_t lr3;
  } col_cfg_t;

  // Select of one 4:1 mux: which row of the previous column it passes.
  typedef logic [1:0]                mux_sel_t;
  // The six muxes feeding one column. Mux k feeds: 0,1 -> row 0 (A/S a,b),
  // 2 -> row 1 (L/R), 3,4 -> row 2 (A/S a,b), 5 -> row 3 (L/R).
  typedef mux_sel_t [NMUX-1:0]       mux_cfg_t;

  localparam int unsigned COL_CFG_W = $bits(col_cfg_t);  // 14
  localparam int unsigned MUX_CFG_W = $bits(mux_cfg_t);  // 12

  // Configuration word length of an array with ncols columns.
  function automatic int unsigned cfg_width(int unsigned ncols);
    return ncols * COL_CFG_W + (ncols - 1) * MUX_CFG_W + 2 * $bits(mux_sel_t) + 1;
  endfunction

  localparam logic signed [DW-1:0] M_MAX = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] M_MIN = {1'b1, {(DW-1){1'b0}}};

  // Map a (DW+1)-bit exact result with exponent e onto the hybrid format.
  function automatic hyb_res_t hyb_fit(logic signed [DW:0] r, logic e);
    hyb_res_t res;
    logic signed [DW-1:0] rs;
    res.ovf = 1'b0;
    res.sat = 1'b0;
    rs      = DW'(r >>> EXP_SHIFT);
    if (r[DW] == r[DW-1]) begin
      res.v = '{prot: e, m: r[DW-1:0]};
    end else if (!e) begin
      res.v   = '{prot: 1'b1, m: rs};
      res.ovf = 1'b1;
    end else begin
      res.v   = '{prot: 1'b1, m: (r[DW] ? M_MIN : M_MAX)};
      res.sat = 1'b1;
    end
    return res;
  endfunction

  // Addition or subtraction of two hybrid samples.
  function automatic hyb_res_t hyb_addsub(hyb_t a, hyb_t b, logic sub);
    logic e;
    logic signed [DW-1:0] am, bm;
    logic signed [DW:0]   r;
    e  = a.prot | b.prot;
    am = (e && !a.prot) ? (a.m >>> EXP_SHIFT) : a.m;
    bm = (e && !b.prot) ? (b.m >>> EXP_SHIFT) : b.m;
    r  = sub ? ((DW+1)'(am) - (DW+1)'(bm)) : ((DW+1)'(am) + (DW+1)'(bm));
    return hyb_fit(r, e);
  endfunction

  // Shift of one hybrid sample.
  function automatic hyb_res_t hyb_shift(hyb_t a, shift_op_t op);
    hyb_res_t res;
    res = '{v: a, ovf: 1'b0, sat: 1'b0};
    case (op)
      SH_L1:   res = hyb_fit({a.m, 1'b0}, a.prot);
      SH_R1:   res.v.m = a.m >>> 1;
      SH_R2:   res.v.m = a.m >>> 2;
      default: ;
    endcase
    return res;
  endfunction

  // Value of a hybrid sample as a plain two's complement number.
  function automatic logic signed [DW+EXP_SHIFT-1:0] hyb_value(hyb_t a);
    logic signed [DW+EXP_SHIFT-1:0] v;
    v = (DW+EXP_SHIFT)'(a.m);
    return a.prot ? (v <<< EXP_SHIFT) : v;
  endfunction

endpackage
