// tb_mux_array: checks the six 4:1 multiplexers between two columns.
// For random column outputs and random selects, output k must equal the
// previous column's row chosen by select k.
module tb_mux_array;
  import ehw_pkg::*;

  hyb_t [NROWS-1:0] prev;
  mux_cfg_t sel;
  hyb_t [NMUX-1:0] out;

  mux_array dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int r = 0; r < int'(NROWS); r++) prev[r] = hyb_t'($urandom);
      for (int k = 0; k < int'(NMUX); k++) sel[k] = 2'($urandom);
      #1;
      for (int k = 0; k < int'(NMUX); k++) begin
        checks++;
        if (out[k] != prev[int'(sel[k])]) begin
          failures++;
          if (failures < 10) $display("FAIL mux %0d", k);
        end
      end
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
