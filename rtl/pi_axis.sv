// pi_axis: one discrete PI current regulator with clamping against integral wind-up.
//
//   e(n) = ref(n) - meas(n)
//   I(n) = clamp(I(n-1) + KiTs*e(n), +-LIMIT)
//   u(n) = clamp(Kp*e(n) + I(n), +-LIMIT)
//
// KiTs is the integral gain already multiplied by the sample time (Kp*T/Ti), so the sum of the
// errors including the present one is weighted by it, as in the discrete PI law of the design.
// The controller advances one sample per `en` strobe (once per PWM period in the loop).
// Timing: `en` registers the error; one cycle later the products, the integrator and the
// output are updated and `valid` pulses, so u is ready PI_LAT = 2 cycles after `en` and holds
// until the next sample. The integrator keeps the full 26 fraction bits of the product so that
// small gains still integrate; clamping the integrator itself is the wind-up protection. The
// output limit is a parameter of this implementation.
module pi_axis
  import foc_pkg::*;
#(
  parameter real LIMIT = 0.57735
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fix_t ref_i,
  input  fix_t meas_i,
  input  fix_t kp,
  input  fix_t ki_ts,
  output fix_t u,
  output logic valid,
  output logic sat            // integrator or output clamped on this sample
);
  localparam int                 QF    = 2 * FIX_FRAC;   // fraction bits of a product
  localparam logic signed [47:0] LIM_Q = 48'(real_to_q(LIMIT, QF));

  logic signed [16:0] e_s1;
  logic               v_s1;
  logic signed [47:0] integ;
  logic signed [47:0] p_term, i_next, u_raw, u_lim;
  logic               sat_i, sat_u;

  function automatic logic signed [47:0] clamp(input logic signed [47:0] v);
    if (v > LIM_Q)       return LIM_Q;
    else if (v < -LIM_Q) return -LIM_Q;
    else                 return v;
  endfunction

  always_comb begin
    p_term = 48'(kp) * 48'(e_s1);
    i_next = integ + 48'(ki_ts) * 48'(e_s1);
    sat_i  = (i_next > LIM_Q) || (i_next < -LIM_Q);
    i_next = clamp(i_next);
    u_raw  = p_term + i_next;
    sat_u  = (u_raw > LIM_Q) || (u_raw < -LIM_Q);
    u_lim  = clamp(u_raw);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_s1  <= '0;
      v_s1  <= 1'b0;
      integ <= '0;
      u     <= '0;
      valid <= 1'b0;
      sat   <= 1'b0;
    end else begin
      v_s1  <= en;
      valid <= v_s1;
      if (en) e_s1 <= 17'(ref_i) - 17'(meas_i);
      if (v_s1) begin
        integ <= i_next;
        u     <= round_sat(64'(u_lim), FIX_FRAC);
        sat   <= sat_i || sat_u;
      end
    end
  end
endmodule
