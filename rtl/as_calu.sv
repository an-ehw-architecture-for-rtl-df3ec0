// as_calu: addition/subtraction CALU of the reconfigurable FIR array.
//
// Computes a + b or a - b on two hybrid samples (20-bit mantissa plus
// protection bit, see ehw_pkg) and passes the result through a programmable
// 0..3 cycle delay chain. Configuration is 3 bits: one add/subtract bit and
// two delay bits, as in the design. The output CALU of the array can only
// delay by one cycle: instantiate it with FIXED_DLY1 = 1, which ignores
// cfg.dly. `sat` and `ovf` flag the operation being computed this cycle
// (before the delay chain); `en` is the gated clock enable of the CALU.
module as_calu
  import ehw_pkg::*;
#(
  parameter bit FIXED_DLY1 = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  as_cfg_t cfg,
  input  hyb_t    a,
  input  hyb_t    b,
  output hyb_t    y,
  output logic    ovf,
  output logic    sat
);
  hyb_res_t   r;
  logic [1:0] dly;

  always_comb begin
    r   = hyb_addsub(a, b, cfg.sub);
    ovf = r.ovf;
    sat = r.sat;
    dly = FIXED_DLY1 ? 2'd1 : cfg.dly;
  end

  delay_chain #(.T(hyb_t)) u_dly (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(dly), .d(r.v), .q(y)
  );
endmodule
