// tb_sdf_bf2: checks one single-delay-feedback butterfly of the FFT pipeline.
//
// The butterfly is instantiated with a feedback delay of 4 and 12-bit words.
// Random complex samples are pushed in while `ctrl`, `rot` and `en` change at
// random; a queue model of the feedback register predicts the output each
// cycle: with ctrl = 0 the oldest word passes out and the input is stored,
// with ctrl = 1 the oldest word a and the (optionally -j rotated) input b
// give (a + b) >> 1 out and (a - b) >> 1 back into the register. With `en`
// low the register must hold its contents.
module tb_sdf_bf2;
  localparam int D = 4;
  localparam int W = 12;

  logic clk = 0, rst_n = 0, en = 1, ctrl = 0, rot = 0;
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;

  sdf_bf2 #(.D(D), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int qre [D], qim [D];     // q[D-1] is the oldest word

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int br, bi, ore, oim, nre, nim;
    foreach (qre[i]) begin qre[i] = 0; qim[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_re = W'($urandom);
      in_im = W'($urandom);
      ctrl  = 1'($urandom);
      rot   = 1'($urandom);
      en    = (i < 1000) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      br = rot ? int'(in_im) : int'(in_re);
      bi = rot ? -int'(in_re) : int'(in_im);
      if (ctrl) begin
        ore = (qre[D-1] + br) >>> 1;  oim = (qim[D-1] + bi) >>> 1;
        nre = (qre[D-1] - br) >>> 1;  nim = (qim[D-1] - bi) >>> 1;
      end else begin
        ore = qre[D-1];  oim = qim[D-1];
        nre = in_re;     nim = in_im;
      end
      // keep the model in the word width, as the hardware does
      ore = int'(W'(ore));  oim = int'(W'(oim));
      nre = int'(W'(nre));  nim = int'(W'(nim));
      check(int'(out_re) == ore, "out_re");
      check(int'(out_im) == oim, "out_im");
      @(posedge clk);
      if (en) begin
        for (int k = D - 1; k > 0; k--) begin qre[k] = qre[k-1]; qim[k] = qim[k-1]; end
        qre[0] = nre; qim[0] = nim;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("FAIL watchdog");
    $finish;
  end
endmodule
