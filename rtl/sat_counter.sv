// sat_counter: counts the saturation events of the array.
//
// Every cycle it adds the number of set bits of `ev` (one flag per active
// CALU) to a running count, which sticks at its maximum instead of wrapping.
// `clr` restarts the count; the array clears it whenever a new configuration
// is applied, so that the count reported to the evolution engine is the
// number of saturations that occurred under the current configuration. The
// counter width is an implementation choice.
module sat_counter #(
  parameter int unsigned N  = 49,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [N-1:0]  ev,
  output logic [CW-1:0] count
);
  logic [$clog2(N+1)-1:0] n_ev;
  logic [CW:0]            sum;

  always_comb begin
    n_ev = '0;
    for (int i = 0; i < int'(N); i++) n_ev = n_ev + $bits(n_ev)'(ev[i]);
    sum = {1'b0, count} + (CW+1)'(n_ev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (clr)    count <= '0;
    else if (sum[CW]) count <= '1;
    else             count <= sum[CW-1:0];
  end
endmodule
