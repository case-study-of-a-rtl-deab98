// park: Park transform of the stationary alpha-beta current into the rotor-flux dq frame.
//
//   I_d =  i_alpha*cos(theta) + i_beta*sin(theta)
//   I_q = -i_alpha*sin(theta) + i_beta*cos(theta)
//
// Structure as in the block version of the reference design: i_alpha and i_beta pass a
// two-cycle delay while sin/cos of theta are read from a two-cycle ROM (sincos_lut); four
// two-cycle multipliers and two one-cycle adders follow. Latency PARK_LAT = 5 cycles from
// (i_ab, theta) to i_dq, fully pipelined. Products are rounded to Fix_16_13 at the adder and the
// sum is saturated.
module park
  import foc_pkg::*;
(
  input  logic   clk,
  input  ab_t    i_ab,
  input  angle_t theta,
  output dq_t    i_dq
);
  fix_t sin_t, cos_t;
  ab_t  ab_s1, ab_s2;
  logic signed [31:0] ac_s3, bs_s3, as_s3, bc_s3;
  logic signed [31:0] ac_s4, bs_s4, as_s4, bc_s4;

  sincos_lut u_lut (.clk(clk), .theta(theta), .sin_o(sin_t), .cos_o(cos_t));

  always_ff @(posedge clk) begin
    ab_s1 <= i_ab;
    ab_s2 <= ab_s1;
    ac_s3 <= 32'(ab_s2.alpha) * 32'(cos_t);
    bs_s3 <= 32'(ab_s2.beta)  * 32'(sin_t);
    as_s3 <= 32'(ab_s2.alpha) * 32'(sin_t);
    bc_s3 <= 32'(ab_s2.beta)  * 32'(cos_t);
    ac_s4 <= ac_s3;
    bs_s4 <= bs_s3;
    as_s4 <= as_s3;
    bc_s4 <= bc_s3;
    i_dq.d <= round_sat(64'(ac_s4) + 64'(bs_s4), FIX_FRAC);
    i_dq.q <= round_sat(64'(bc_s4) - 64'(as_s4), FIX_FRAC);
  end
endmodule
