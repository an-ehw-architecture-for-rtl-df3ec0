// sdf_bf2: one single-delay-feedback radix-2 butterfly of the pipelined FFT.
//
// A feedback shift register of D complex words pairs every sample with the
// one D cycles later. While `ctrl` is 0 the input goes into the register and
// the output is the register's oldest word (a difference computed for the
// previous pair). While `ctrl` is 1 the oldest word a and the input b form
// (a + b) / 2, sent to the output, and (a - b) / 2, written back into the
// register. With `rot` high (used by the second butterfly of each radix-2^2
// stage) b is first multiplied by -j. The halving makes a chain of eight
// butterflies scale by 1/256. Each word enters the register once per cycle
// while `en` is high. Latency: D cycles.
module sdf_bf2 #(
  parameter int unsigned D = 128,
  parameter int unsigned W = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                ctrl,
  input  logic                rot,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  logic signed [W-1:0] fre [D];
  logic signed [W-1:0] fim [D];
  logic signed [W-1:0] br, bi, back_re, back_im;
  logic signed [W:0]   sr, si, dr, di;

  always_comb begin
    // b * (-j) = (bi, -br)
    br = rot ? in_im : in_re;
    bi = rot ? -in_re : in_im;
    sr = (W+1)'(fre[D-1]) + (W+1)'(br);
    si = (W+1)'(fim[D-1]) + (W+1)'(bi);
    dr = (W+1)'(fre[D-1]) - (W+1)'(br);
    di = (W+1)'(fim[D-1]) - (W+1)'(bi);
    if (ctrl) begin
      out_re  = W'(sr >>> 1);
      out_im  = W'(si >>> 1);
      back_re = W'(dr >>> 1);
      back_im = W'(di >>> 1);
    end else begin
      out_re  = fre[D-1];
      out_im  = fim[D-1];
      back_re = in_re;
      back_im = in_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(D); i++) begin
        fre[i] <= '0;
        fim[i] <= '0;
      end
    end else if (en) begin
      fre[0] <= back_re;
      fim[0] <= back_im;
      for (int i = 1; i < int'(D); i++) begin
        fre[i] <= fre[i-1];
        fim[i] <= fim[i-1];
      end
    end
  end
endmodule
