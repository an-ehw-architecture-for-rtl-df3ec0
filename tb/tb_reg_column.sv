// tb_reg_column: checks the column of six pipeline registers: after reset
// all outputs are 0, and every output equals its input one clock earlier.
module tb_reg_column;
  import ehw_pkg::*;

  logic clk = 0, rst_n = 0;
  hyb_t [NMUX-1:0] d = '0, q;

  reg_column dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    hyb_t [NMUX-1:0] prev;
    d = '1;
    @(posedge clk); #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int k = 0; k < int'(NMUX); k++) d[k] = hyb_t'($urandom);
      prev = d;
      @(posedge clk); #1;
      checks++;
      if (q != prev) begin failures++; if (failures < 10) $display("FAIL stage %0d", i); end
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
