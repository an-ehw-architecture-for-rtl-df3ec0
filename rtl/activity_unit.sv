// activity_unit: finds the CALUs that take part in the loaded configuration.
//
// A CALU contributes to the filter output only if a path of selected
// multiplexer inputs leads from it to the output A/S CALU. Starting from the
// two output multiplexers, this unit walks the array backwards column by
// column: a CALU of column c-1 is active if a mux whose select points at it
// feeds an active CALU of column c. The resulting mask drives the clock
// enables of the CALUs, so unused CALUs are switched off as the design
// intends with its AND-gated CALU clocks; `n_active` counts the active
// CALUs including the always-on output CALU (the utilization). The walk is
// combinational (NCOLS levels deep) and only changes with the configuration.
module activity_unit
  import ehw_pkg::*;
#(
  parameter int unsigned NCOLS = 12
) (
  input  mux_cfg_t [NCOLS-1:1]            mux_cfg,  // mux_cfg[c] feeds column c
  input  mux_sel_t [1:0]                  fin_sel,  // output CALU operands
  output logic [NCOLS-1:0][NROWS-1:0]     active,
  output logic [$clog2(NCOLS*NROWS+2)-1:0] n_active
);
  // Row of the CALU fed by mux k.
  function automatic int unsigned row_of(int unsigned k);
    case (k)
      0, 1:    return 0;
      2:       return 1;
      3, 4:    return 2;
      default: return 3;
    endcase
  endfunction

  always_comb begin
    active = '0;
    for (int j = 0; j < 2; j++) active[NCOLS-1][fin_sel[j]] = 1'b1;
    for (int c = int'(NCOLS) - 1; c >= 1; c--) begin
      for (int k = 0; k < int'(NMUX); k++) begin
        if (active[c][row_of(k)]) active[c-1][mux_cfg[c][k]] = 1'b1;
      end
    end
    n_active = 1;
    for (int c = 0; c < int'(NCOLS); c++)
      for (int r = 0; r < int'(NROWS); r++)
        n_active = n_active + $bits(n_active)'(active[c][r]);
  end
endmodule
