// sync2: two-flop synchronizer for a level signal vector entering the clock
// domain of clk. Used for quasi-static control bits crossing between the
// host clock and the PHY clock. Output lags the input by two clk edges.
module sync2 #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
