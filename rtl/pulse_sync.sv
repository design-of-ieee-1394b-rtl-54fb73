// pulse_sync: carries single-cycle event pulses from clock domain a to clock
// domain b. Each bit toggles a flag in domain a; domain b synchronizes the flag
// with two flops and emits a one-cycle pulse per toggle. Pulses on the same
// bit must be at least three b-cycles apart to be counted separately.
module pulse_sync #(
  parameter int W = 1
) (
  input  logic         clk_a,
  input  logic         rst_a,
  input  logic [W-1:0] pulse_a,
  input  logic         clk_b,
  input  logic         rst_b,
  output logic [W-1:0] pulse_b
);
  logic [W-1:0] tog_a, s1, s2, s3;
  always_ff @(posedge clk_a) begin
    if (rst_a) tog_a <= '0;
    else       tog_a <= tog_a ^ pulse_a;
  end
  always_ff @(posedge clk_b) begin
    if (rst_b) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= tog_a; s2 <= s1; s3 <= s2;
    end
  end
  assign pulse_b = s2 ^ s3;
endmodule
