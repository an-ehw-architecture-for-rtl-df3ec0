// delay_chain: the programmable delay at the output of every CALU.
//
// Three registers in series hold the last three values of `d`; a 4:1
// multiplexer picks the undelayed input (sel = 0) or the output of register
// 1, 2 or 3, so the CALU result reaches the interconnect after 0 to 3 clock
// cycles. Delay 0 is a combinational path. This structure is the one drawn
// for both CALU kinds. `en` stands for the gated CALU clock: while it is low
// the chain holds its contents (the array switches off unused CALUs this
// way). Reset is asynchronous, active low, and clears the chain; the reset
// style is this implementation's choice.
module delay_chain #(
  parameter type T = ehw_pkg::hyb_t
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] sel,
  input  T           d,
  output T           q
);
  T stage [ehw_pkg::MAX_DLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ehw_pkg::MAX_DLY); i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < int'(ehw_pkg::MAX_DLY); i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    unique case (sel)
      2'd0:    q = d;
      2'd1:    q = stage[0];
      2'd2:    q = stage[1];
      default: q = stage[2];
    endcase
  end
endmodule
