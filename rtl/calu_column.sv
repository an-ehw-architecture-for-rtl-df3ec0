// calu_column: one column of the reconfigurable array.
//
// Four CALUs, top to bottom an A/S, an L/R, an A/S and an L/R CALU, fed by
// the six outputs of the preceding mux array (see mux_array for which input
// goes where). Two A/S and two L/R CALUs per column over twelve columns,
// plus the output A/S CALU, give the 25 A/S and 24 L/R CALUs of the design;
// the row order is read from its array drawing. `en` carries one gated clock
// enable per row; `sat`/`ovf` one event flag per row.
module calu_column
  import ehw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NROWS-1:0] en,
  input  col_cfg_t         cfg,
  input  hyb_t [NMUX-1:0]  in,
  output hyb_t [NROWS-1:0] out,
  output logic [NROWS-1:0] ovf,
  output logic [NROWS-1:0] sat
);
  as_calu u_as0 (
    .clk, .rst_n, .en(en[0]), .cfg(cfg.as0), .a(in[0]), .b(in[1]),
    .y(out[0]), .ovf(ovf[0]), .sat(sat[0])
  );
  lr_calu u_lr1 (
    .clk, .rst_n, .en(en[1]), .cfg(cfg.lr1), .a(in[2]),
    .y(out[1]), .ovf(ovf[1]), .sat(sat[1])
  );
  as_calu u_as2 (
    .clk, .rst_n, .en(en[2]), .cfg(cfg.as2), .a(in[3]), .b(in[4]),
    .y(out[2]), .ovf(ovf[2]), .sat(sat[2])
  );
  lr_calu u_lr3 (
    .clk, .rst_n, .en(en[3]), .cfg(cfg.lr3), .a(in[5]),
    .y(out[3]), .ovf(ovf[3]), .sat(sat[3])
  );
endmodule
