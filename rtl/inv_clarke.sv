// inv_clarke: inverse Clarke transform of the voltage reference from alpha-beta to abc.
//
//   V_a = V_alpha
//   V_b = -V_alpha/2 + (sqrt(3)/2) * V_beta
//   V_c = -V_alpha/2 - (sqrt(3)/2) * V_beta
//
// The product (sqrt(3)/2)*V_beta is formed in a two-cycle multiplier stage with the constant
// as a 16-bit unsigned fraction, the half of V_alpha is an arithmetic shift, the sums take one
// cycle and a final round/saturate stage plus an output register give the latency of five
// cycles (INV_CLARKE_LAT) that the reference design annotates on this block. Fully pipelined.
module inv_clarke
  import foc_pkg::*;
(
  input  logic clk,
  input  ab_t  v_ab,
  output abc_t v_abc
);
  // sqrt(3)/2 as UFix_16_16.
  localparam logic [15:0] SQRT3_2 = 16'd56756;

  logic signed [32:0] kb_s1, kb_s2;
  logic signed [32:0] ha_s1, ha_s2;   // -V_alpha/2 with 16 extra fraction bits
  fix_t               a_s1, a_s2, a_s3, a_s4;
  logic signed [33:0] vb_s3, vc_s3;
  fix_t               vb_s4, vc_s4;

  always_ff @(posedge clk) begin
    kb_s1 <= 33'(v_ab.beta) * 33'(signed'({1'b0, SQRT3_2}));
    ha_s1 <= -(33'(v_ab.alpha) <<< 15);
    a_s1  <= v_ab.alpha;
    kb_s2 <= kb_s1;
    ha_s2 <= ha_s1;
    a_s2  <= a_s1;
    vb_s3 <= 34'(ha_s2) + 34'(kb_s2);
    vc_s3 <= 34'(ha_s2) - 34'(kb_s2);
    a_s3  <= a_s2;
    vb_s4 <= round_sat(64'(vb_s3), 16);
    vc_s4 <= round_sat(64'(vc_s3), 16);
    a_s4  <= a_s3;
    v_abc.a <= a_s4;
    v_abc.b <= vb_s4;
    v_abc.c <= vc_s4;
  end
endmodule
