// pi_current_controller: the d- and q-axis current regulators of the FOC loop.
//
// Two pi_axis instances share the proportional gain Kp and the discrete integral gain
// Ki*Ts, which are run-time inputs as in the reference design. Each regulates its current
// (i_d towards i_d_ref, i_q towards i_q_ref) and outputs a voltage reference in per unit of
// the DC-link voltage. `en` advances both regulators by one sample; the outputs are ready
// PI_LAT = 2 cycles later (`valid`) and are held until the next sample. `sat` reports, per
// axis, that the anti-wind-up clamp acted on the last sample.
module pi_current_controller
  import foc_pkg::*;
#(
  parameter real LIMIT = 0.57735
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  dq_t        i_ref,
  input  dq_t        i_meas,
  input  fix_t       kp,
  input  fix_t       ki_ts,
  output dq_t        u,
  output logic       valid,
  output logic [1:0] sat        // [1] = d axis, [0] = q axis
);
  logic valid_q;

  pi_axis #(.LIMIT(LIMIT)) u_d (
    .clk, .rst_n, .en, .ref_i(i_ref.d), .meas_i(i_meas.d), .kp, .ki_ts,
    .u(u.d), .valid(valid), .sat(sat[1])
  );
  pi_axis #(.LIMIT(LIMIT)) u_q (
    .clk, .rst_n, .en, .ref_i(i_ref.q), .meas_i(i_meas.q), .kp, .ki_ts,
    .u(u.q), .valid(valid_q), .sat(sat[0])
  );

  // Both axes run from the same strobe.
  always_ff @(posedge clk) begin
    if (rst_n) assert (valid == valid_q) else $error("PI axes out of step");
  end
endmodule
