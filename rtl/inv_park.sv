// inv_park: inverse Park transform of the dq voltage reference into the alpha-beta frame.
//
//   V_alpha = V_d*cos(theta) - V_q*sin(theta)
//   V_beta  = V_d*sin(theta) + V_q*cos(theta)
//
// Same pipeline as park: two-cycle input delay in parallel with the two-cycle sin/cos ROM,
// two-cycle multipliers, one-cycle round/saturate adders. Latency INV_PARK_LAT = 5 cycles, the
// value the reference design annotates on its inverse Park block; fully pipelined.
module inv_park
  import foc_pkg::*;
(
  input  logic   clk,
  input  dq_t    v_dq,
  input  angle_t theta,
  output ab_t    v_ab
);
  fix_t sin_t, cos_t;
  dq_t  dq_s1, dq_s2;
  logic signed [31:0] dc_s3, qs_s3, ds_s3, qc_s3;
  logic signed [31:0] dc_s4, qs_s4, ds_s4, qc_s4;

  sincos_lut u_lut (.clk(clk), .theta(theta), .sin_o(sin_t), .cos_o(cos_t));

  always_ff @(posedge clk) begin
    dq_s1 <= v_dq;
    dq_s2 <= dq_s1;
    dc_s3 <= 32'(dq_s2.d) * 32'(cos_t);
    qs_s3 <= 32'(dq_s2.q) * 32'(sin_t);
    ds_s3 <= 32'(dq_s2.d) * 32'(sin_t);
    qc_s3 <= 32'(dq_s2.q) * 32'(cos_t);
    dc_s4 <= dc_s3;
    qs_s4 <= qs_s3;
    ds_s4 <= ds_s3;
    qc_s4 <= qc_s3;
    v_ab.alpha <= round_sat(64'(dc_s4) - 64'(qs_s4), FIX_FRAC);
    v_ab.beta  <= round_sat(64'(ds_s4) + 64'(qc_s4), FIX_FRAC);
  end
endmodule
