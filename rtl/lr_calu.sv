// lr_calu: left/right shift CALU of the reconfigurable FIR array.
//
// Multiplies a hybrid sample by 2, 1/2, 1/4 or 1 (shift left by one, right
// by one or two, or no shift) and passes the result through a programmable
// 0..3 cycle delay chain. Configuration is 4 bits: two shift bits and two
// delay bits, as in the design; the code of each shift kind is this
// implementation's choice (ehw_pkg::shift_op_t). A left shift that would
// overflow sets the protection bit, or saturates if it is already set.
// `sat`/`ovf` flag the operation of this cycle; `en` is the gated clock.
module lr_calu
  import ehw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  lr_cfg_t cfg,
  input  hyb_t    a,
  output hyb_t    y,
  output logic    ovf,
  output logic    sat
);
  hyb_res_t r;

  always_comb begin
    r   = hyb_shift(a, cfg.op);
    ovf = r.ovf;
    sat = r.sat;
  end

  delay_chain #(.T(hyb_t)) u_dly (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(cfg.dly), .d(r.v), .q(y)
  );
endmodule
