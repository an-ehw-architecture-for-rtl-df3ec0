// tb_fft256_r4: self-checking test of the 256-point radix-4 FFT.
//
// Several 256-sample frames (an impulse, a constant, a pure tone and random
// data of full 23-bit scale) are transformed. Every bin is compared with a
// direct DFT computed here in floating point, X[k] = 1/256 * sum x[n] *
// exp(-j 2 pi n k / 256), within a tolerance of a few LSBs plus the relative
// error of 14-bit twiddles. The timing is checked too: the last bin must
// leave 768 cycles after `start`, bins in order 0..255 on consecutive cycles.
module tb_fft256_r4;
  localparam int IW = 23;
  localparam int W  = IW + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [IW-1:0] in_sample = '0;
  logic busy, out_valid;
  logic [7:0] out_idx;
  logic signed [W-1:0] out_re, out_im;

  fft256_r4 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int frame [256];

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_frame(string name);
    real er, ei, tol, maxabs;
    int cyc, nbins;
    maxabs = 1.0;
    foreach (frame[n]) if (rabs(real'(frame[n])) > maxabs) maxabs = rabs(real'(frame[n]));
    tol = 6.0 + maxabs * 2.0e-5;
    @(negedge clk);
    start = 1;
    in_sample = IW'(frame[0]);
    for (int n = 1; n < 256; n++) begin
      @(negedge clk);
      start = 0;
      in_sample = IW'(frame[n]);
    end
    @(negedge clk);
    in_sample = '0;
    cyc = 256;
    nbins = 0;
    while (!out_valid && cyc < 2000) begin @(negedge clk); cyc++; end
    check(cyc == 512, {name, ": first bin 512 cycles after start"});
    while (out_valid) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 256; n++) begin
        er += real'(frame[n]) * $cos(2.0 * PI * real'(n) * real'(out_idx) / 256.0);
        ei -= real'(frame[n]) * $sin(2.0 * PI * real'(n) * real'(out_idx) / 256.0);
      end
      er /= 256.0; ei /= 256.0;
      check(int'(out_idx) == nbins, {name, ": bin order"});
      check(rabs(real'(out_re) - er) <= tol && rabs(real'(out_im) - ei) <= tol, {name, ": bin value"});
      if (rabs(real'(out_re) - er) > tol || rabs(real'(out_im) - ei) > tol)
        if (failures < 20) $display("  bin %0d got %0d %0d want %f %f", out_idx, out_re, out_im, er, ei);
      nbins++;
      @(negedge clk);
      cyc++;
    end
    check(nbins == 256 && cyc == 768, {name, ": 256 bins, last one 768 cycles after start"});
    check(!busy, {name, ": idle afterwards"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (frame[n]) frame[n] = (n == 0) ? 256000 : 0;
    run_frame("impulse");
    foreach (frame[n]) frame[n] = 1000;
    run_frame("constant");
    foreach (frame[n]) frame[n] = $rtoi(400000.0 * $cos(2.0 * PI * 8.0 * real'(n) / 256.0));
    run_frame("tone");
    for (int r = 0; r < 3; r++) begin
      foreach (frame[n]) frame[n] = int'($urandom_range(0, 8388607)) - 4194304;
      run_frame("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
