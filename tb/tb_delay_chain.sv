// tb_delay_chain: checks the programmable 0..3 cycle delay of a CALU.
//
// A random stream is pushed through the chain while the tap select changes
// at random; the output must equal the input of `sel` cycles earlier (the
// current input for sel = 0). With `en` low (clock gated) the chain must
// hold its contents.
module tb_delay_chain;
  logic clk = 0, rst_n = 0, en = 1;
  logic [1:0] sel = '0;
  logic [20:0] d = '0, q;

  delay_chain #(.T(logic [20:0])) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [20:0] hist [4];   // hist[i]: input of i edges ago (enabled edges)

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      d   = 21'($urandom);
      sel = 2'($urandom);
      en  = (i < 300) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      hist[0] = d;
      check(q == hist[sel], "tap");
      @(posedge clk);
      if (en) begin
        hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
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
