// reg_column: a column of six pipeline registers.
//
// Inserted after every fifth CALU column, between a mux array and the next
// column, so that configurations whose CALUs all use delay 0 still have a
// register on their path at least every five columns. Each of the six
// inter-column signals is delayed by exactly one clock. The registers are
// never clock gated (an implementation choice) and reset asynchronously to 0.
module reg_column
  import ehw_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  hyb_t [NMUX-1:0] d,
  output hyb_t [NMUX-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
