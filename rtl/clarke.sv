// clarke: Clarke transform of two measured phase currents into the stationary alpha-beta frame.
//
//   i_alpha = i_a
//   i_beta  = (i_a + 2*i_b) / sqrt(3)
//
// The third phase current is implied by i_a + i_b + i_c = 0 and is not needed. The pipeline
// follows the block version of the transform: i_b is doubled in a two-cycle multiplier stage,
// added to i_a in a one-cycle adder, and the sum is scaled by the constant 0.57733154296875
// (1/sqrt(3) as a 16-bit unsigned fraction) in a two-cycle multiplier stage; i_alpha is a
// five-cycle delay of i_a. Latency CLARKE_LAT = 5 cycles for both outputs, fully pipelined
// (a new sample every cycle). Here i_a is delayed by two cycles before the adder so that both
// adder inputs come from the same sample; the result is rounded and saturated to Fix_16_13.
module clarke
  import foc_pkg::*;
(
  input  logic clk,
  input  fix_t i_a,
  input  fix_t i_b,
  output ab_t  i_ab
);
  // 1/sqrt(3) as UFix_16_16.
  localparam logic [15:0] INV_SQRT3 = 16'd37836;

  logic signed [16:0] b2_s1, b2_s2;
  fix_t               a_d [4];
  logic signed [17:0] sum_s3;
  logic signed [34:0] prod_s4;

  always_ff @(posedge clk) begin
    b2_s1   <= 17'(i_b) <<< 1;
    b2_s2   <= b2_s1;
    a_d[0]  <= i_a;
    a_d[1]  <= a_d[0];
    a_d[2]  <= a_d[1];
    a_d[3]  <= a_d[2];
    sum_s3  <= 18'(a_d[1]) + 18'(b2_s2);
    prod_s4 <= 35'(sum_s3) * 35'(signed'({1'b0, INV_SQRT3}));
    i_ab.alpha <= a_d[3];
    i_ab.beta  <= round_sat(64'(prod_s4), 16);
  end
endmodule
