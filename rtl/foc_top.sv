// foc_top: field oriented current control of a three-phase permanent magnet motor.
//
// One control sample is taken per PWM period (8 kHz with the defaults):
//   * At the carrier peak (sync_top) spi_adc reads both phase-current ADCs; adc_scale turns the
//     codes into i_a, i_b in ampere. quad_encoder and elec_angle track the electrical angle.
//   * At the carrier valley (sync_bot) the input bank samples i_a, i_b, theta_e, the current
//     references and the gains. From there a strobe follows the data through the pipeline:
//       Clarke (5) -> Park (5) -> PI regulators (2) -> + feed forward (1)
//       -> inverse Park (5) -> inverse Clarke (5) -> SVPWM (3) -> duty register (1)
//     The feed-forward block works in parallel from the sampled references and angle and
//     also hands its angle to the inverse Park transform. A sample is finished
//     LOOP_LATENCY = 28 clock cycles after sync_bot (`loop_done`).
//   * pwm_counter takes the new duty cycles at the next valley, so a sample taken at the valley
//     of period n drives the gates in period n+1.
// Currents are Fix_16_13 ampere, voltages Fix_16_13 per unit of the DC-link voltage V_BASE.
// The chain, the block latencies of the transforms, the 125 us period and the six gate outputs
// follow the reference design; the single sample bank with a travelling strobe (instead of a
// register bank between every group of blocks) and all numeric formats not printed there are
// this implementation's choices. The ADC converters, the inverter bridge and the motor are
// outside: their signals are the ports.
module foc_top
  import foc_pkg::*;
#(
  parameter int  HALF_PERIOD = 12500,       // carrier half period in clock cycles
  parameter int  SCLK_HALF   = 32,          // ADC SPI clock half period in clock cycles
  parameter int  POLE_PAIRS  = 4,
  parameter int  ZERO_CODE   = 2048,
  parameter real AMP_PER_LSB = 0.001953125,
  parameter real R_OHM       = 1.6,
  parameter real L_H         = 0.002151,
  parameter real PSI_VS      = 0.0066070556640625,
  parameter real FS_HZ       = 8000.0,
  parameter real V_BASE      = 36.0,
  parameter real U_LIMIT     = 0.57735
) (
  input  logic       clk,
  input  logic       rst_n,
  // set points and gains
  input  fix_t       id_ref,
  input  fix_t       iq_ref,
  input  fix_t       kp,
  input  fix_t       ki_ts,
  input  angle_t     theta_offset,
  input  logic [2:0] adc_ch,
  // phase-current ADCs (two ADC122S051 sharing CS and SCLK)
  input  logic       spi_uin,
  input  logic       spi_vin,
  output logic       spi_uout,
  output logic       spi_vout,
  output logic       spi_clk,
  output logic       spi_cs_n,
  // encoder
  input  logic       quad_a,
  input  logic       quad_b,
  // inverter gates, [0] = phase a
  output logic [2:0] pwm_hi,
  output logic [2:0] pwm_lo,
  // observation
  output fix_t       i_d,
  output fix_t       i_q,
  output angle_t     theta_out,
  output abc_t       duty,
  output logic [2:0] sector,
  output logic [1:0] pi_sat,
  output logic       overmod,
  output logic       loop_done,
  output logic       sync_bot,
  output logic       sync_top,
  output angle_t     theta_mec,
  output logic       enc_dir,
  output logic [7:0] enc_err,
  output logic [15:0] carrier
);
  localparam int FRONT_LAT    = CLARKE_LAT + PARK_LAT;
  localparam int BACK_LAT     = INV_PARK_LAT + INV_CLARKE_LAT;
  localparam int LOOP_LATENCY = 1 + FRONT_LAT + PI_LAT + 1 + BACK_LAT + SVPWM_LAT + 1;

  // ---------------- measurement ----------------
  logic [11:0] code_u, code_v;
  logic        adc_ready, adc_busy;
  fix_t        i_a, i_b;
  logic        ia_valid, ib_valid;
  angle_t      theta_e;

  spi_adc #(.SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst_n, .conversion(sync_top), .spi_uin, .spi_vin, .adc_ch,
    .spi_uout, .spi_vout, .spi_clk, .spi_cs_n,
    .conversion_ready(adc_ready), .data_out_u(code_u), .data_out_v(code_v), .busy(adc_busy)
  );

  adc_scale #(.ZERO_CODE(ZERO_CODE), .AMP_PER_LSB(AMP_PER_LSB)) u_scale_a (
    .clk, .rst_n, .load(adc_ready), .code(code_u), .current(i_a), .valid(ia_valid)
  );
  adc_scale #(.ZERO_CODE(ZERO_CODE), .AMP_PER_LSB(AMP_PER_LSB)) u_scale_b (
    .clk, .rst_n, .load(adc_ready), .code(code_v), .current(i_b), .valid(ib_valid)
  );

  quad_encoder u_enc (
    .clk, .rst_n, .quad_a, .quad_b, .counter_value(theta_mec), .dir(enc_dir), .err_cnt(enc_err)
  );

  elec_angle #(.POLE_PAIRS(POLE_PAIRS)) u_angle (
    .clk, .rst_n, .theta_mec, .theta_offset, .theta_e
  );

  // ---------------- input sample bank ----------------
  fix_t   ia_s, ib_s, kp_s, kits_s;
  dq_t    iref_s;
  angle_t theta_s;
  logic   st0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ia_s    <= '0;
      ib_s    <= '0;
      kp_s    <= '0;
      kits_s  <= '0;
      iref_s  <= '0;
      theta_s <= '0;
      st0     <= 1'b0;
    end else begin
      st0 <= sync_bot;
      if (sync_bot) begin
        ia_s     <= i_a;
        ib_s     <= i_b;
        kp_s     <= kp;
        kits_s   <= ki_ts;
        iref_s.d <= id_ref;
        iref_s.q <= iq_ref;
        theta_s  <= theta_e;
      end
    end
  end

  // ---------------- current measurement transforms ----------------
  ab_t    i_ab;
  dq_t    i_dq;
  angle_t theta_park;
  logic   st_dq;

  clarke u_clarke (.clk, .i_a(ia_s), .i_b(ib_s), .i_ab);

  delay_line #(.WIDTH(ANG_W), .DEPTH(CLARKE_LAT)) u_dth (
    .clk, .rst_n, .d(theta_s), .q(theta_park)
  );
  delay_line #(.WIDTH(1), .DEPTH(FRONT_LAT)) u_dst_dq (
    .clk, .rst_n, .d(st0), .q(st_dq)
  );

  park u_park (.clk, .i_ab, .theta(theta_park), .i_dq);

  // ---------------- regulators and feed forward ----------------
  dq_t    u_pi, u_ff, v_dq;
  angle_t theta_ff;
  logic   pi_valid, ff_valid, st_vdq;

  pi_current_controller #(.LIMIT(U_LIMIT)) u_pi_ctrl (
    .clk, .rst_n, .en(st_dq), .i_ref(iref_s), .i_meas(i_dq), .kp(kp_s), .ki_ts(kits_s),
    .u(u_pi), .valid(pi_valid), .sat(pi_sat)
  );

  feedforward #(
    .R_OHM(R_OHM), .L_H(L_H), .PSI_VS(PSI_VS), .FS_HZ(FS_HZ), .V_BASE(V_BASE)
  ) u_ffwd (
    .clk, .rst_n, .en(st0), .i_ref(iref_s), .theta_e(theta_s),
    .u(u_ff), .theta_o(theta_ff), .valid(ff_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_dq   <= '0;
      st_vdq <= 1'b0;
      i_d    <= '0;
      i_q    <= '0;
    end else begin
      st_vdq <= pi_valid;
      if (st_dq) begin
        i_d <= i_dq.d;
        i_q <= i_dq.q;
      end
      if (pi_valid) begin
        v_dq.d <= sat_fix(64'(u_pi.d) + 64'(u_ff.d));
        v_dq.q <= sat_fix(64'(u_pi.q) + 64'(u_ff.q));
      end
    end
  end

  // ---------------- voltage transforms and modulation ----------------
  ab_t  v_ab;
  abc_t v_abc, duty_c;
  logic st_svm, svm_valid, om_c;
  logic [2:0] sec_c;

  inv_park   u_inv_park   (.clk, .v_dq, .theta(theta_ff), .v_ab);
  inv_clarke u_inv_clarke (.clk, .v_ab, .v_abc);

  delay_line #(.WIDTH(1), .DEPTH(BACK_LAT)) u_dst_svm (
    .clk, .rst_n, .d(st_vdq), .q(st_svm)
  );

  svpwm u_svpwm (
    .clk, .rst_n, .valid_in(st_svm), .v_abc, .duty(duty_c), .sector(sec_c),
    .overmod(om_c), .valid(svm_valid)
  );

  // Output bank: the duty cycles of the finished sample.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      duty      <= '0;
      sector    <= 3'd1;
      overmod   <= 1'b0;
      loop_done <= 1'b0;
      theta_out <= '0;
    end else begin
      loop_done <= svm_valid;
      if (svm_valid) begin
        duty      <= duty_c;
        sector    <= sec_c;
        overmod   <= om_c;
        theta_out <= theta_ff;
      end
    end
  end

  pwm_counter #(.HALF_PERIOD(HALF_PERIOD)) u_pwm (
    .clk, .rst_n, .duty, .carrier, .sync_bot, .sync_top, .pwm_hi, .pwm_lo
  );

  // Both current channels come from one ADC frame; the feed forward is ready before the
  // regulators, so the sum at pi_valid always uses the current sample's feed forward.
  logic ff_seen;
  always_ff @(posedge clk) begin
    if (!rst_n) ff_seen <= 1'b0;
    else if (ff_valid) ff_seen <= 1'b1;
    else if (pi_valid) ff_seen <= 1'b0;
  end
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (ia_valid == ib_valid) else $error("current channels out of step");
      if (pi_valid) assert (ff_seen) else $error("feed forward not ready");
    end
  end

  // The sample must be finished well inside the period that follows sync_bot.
  initial assert (LOOP_LATENCY < 2 * HALF_PERIOD);
  // The ADC frame started at the carrier peak ends before the next valley.
  always_ff @(posedge clk) begin
    if (rst_n && sync_bot) assert (!adc_busy) else if (rst_n && sync_bot) $error("ADC still busy");
  end
endmodule
