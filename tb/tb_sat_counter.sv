// tb_sat_counter: checks the saturation event counter: it adds the number
// of flags set each cycle, restarts on `clr`, and sticks at its maximum.
module tb_sat_counter;
  localparam int N = 49, CW = 8;

  logic clk = 0, rst_n = 0, clr = 0;
  logic [N-1:0] ev = '0;
  logic [CW-1:0] count;

  sat_counter #(.N(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, expect_c = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ev  = '0;
      for (int k = 0; k < N; k++) ev[k] = ($urandom_range(0, 15) == 0);
      clr = (i % 50 == 49);
      if (clr) expect_c = 0;
      else begin
        for (int k = 0; k < N; k++) expect_c += ev[k];
        if (expect_c > 255) expect_c = 255;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(count) != expect_c) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d want %0d", count, expect_c);
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
