// mux_array: the interconnect between two adjacent CALU columns.
//
// Six 4:1 multiplexers, each choosing one of the four outputs of the
// previous column. Their outputs feed the next column: muxes 0 and 1 the
// operands of the A/S CALU in row 0, mux 2 the L/R CALU in row 1, muxes 3
// and 4 the A/S CALU in row 2 and mux 5 the L/R CALU in row 3. The count of
// six 4:1 multiplexers is the design's; the mapping of mux to operand is
// read from its array drawing. Purely combinational, with 2 select bits each.
module mux_array
  import ehw_pkg::*;
(
  input  hyb_t [NROWS-1:0] prev,
  input  mux_cfg_t         sel,
  output hyb_t [NMUX-1:0]  out
);
  always_comb begin
    for (int k = 0; k < int'(NMUX); k++) out[k] = prev[sel[k]];
  end
endmodule
