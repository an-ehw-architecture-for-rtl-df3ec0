// tb_activity_unit: checks the detection of CALUs that take part in a
// configuration.
//
// For random mux settings the expected mask is found by asking, for every
// CALU, whether it reaches the output: directly through an output mux for
// the last column, otherwise through some mux of the next column that
// selects it and feeds a CALU that reaches the output. Directed cases: all
// muxes on row 1 (a single chain: 12 CALUs plus the output CALU active) and
// the largest possible use (only two CALUs of the last column can reach
// the output CALU, so at most 47 of the 49 CALUs are active).
module tb_activity_unit;
  import ehw_pkg::*;

  localparam int NC = 12;

  mux_cfg_t [NC-1:1] mux_cfg;
  mux_sel_t [1:0] fin_sel;
  logic [NC-1:0][NROWS-1:0] active;
  logic [$clog2(NC*NROWS+2)-1:0] n_active;

  activity_unit #(.NCOLS(NC)) dut (.*);

  int checks = 0, failures = 0;
  int feeds [NMUX] = '{0, 0, 1, 2, 2, 3};   // row fed by mux k

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic verify();
    bit reach [NC][NROWS];
    int cnt;
    for (int c = NC - 1; c >= 0; c--)
      for (int r = 0; r < int'(NROWS); r++) begin
        reach[c][r] = 0;
        if (c == NC - 1) reach[c][r] = (int'(fin_sel[0]) == r) || (int'(fin_sel[1]) == r);
        else
          for (int k = 0; k < int'(NMUX); k++)
            if (int'(mux_cfg[c+1][k]) == r && reach[c+1][feeds[k]]) reach[c][r] = 1;
      end
    cnt = 1;
    #1;
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < int'(NROWS); r++) begin
        check(active[c][r] == reach[c][r], "mask bit");
        cnt += reach[c][r];
      end
    check(int'(n_active) == cnt, "count");
  endtask

  initial begin
    mux_cfg = {(NC-1){{NMUX{2'd1}}}};
    fin_sel = {2'd1, 2'd1};
    verify();
    check(n_active == 13, "single chain uses 13 CALUs");
    for (int c = 1; c < NC; c++) mux_cfg[c] = {2'd0, 2'd3, 2'd2, 2'd0, 2'd1, 2'd0};
    fin_sel = {2'd2, 2'd0};
    verify();
    check(n_active == 47, "largest use: 47 CALUs");
    for (int i = 0; i < 500; i++) begin
      for (int c = 1; c < NC; c++) mux_cfg[c] = mux_cfg_t'($urandom);
      fin_sel = 4'($urandom);
      verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
