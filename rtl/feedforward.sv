// feedforward: feed-forward voltage of a permanent magnet motor from the reference currents.
//
//   V_d = R*i_d + L*di_d/dt - L*i_q*w
//   V_q = R*i_q + L*di_q/dt + L*i_d*w + Psi*w
//
// i_d, i_q are the reference currents (A), w = d(theta_e)/dt the electrical speed. All
// derivatives are backward differences over one sample period Ts = 1/FS_HZ: the previous
// currents and the previous angle are held in registers that load on `en`, and the speed is the
// angle step (a 12-bit difference, so the wrap of the angle is handled by two's complement)
// times 2*pi*FS_HZ/4096 rad/s. Results are divided by V_BASE (the DC-link voltage) to give the
// per-unit voltage the rest of the loop uses. Motor constants R, L, Psi and the 8 kHz sample
// rate default to the reference design's values; the per-unit scaling and the choice of
// 30-fraction-bit internal constants are this implementation's. Timing: `en` captures a
// sample; u and theta_o (the angle that was used, for the inverse Park transform) are ready
// FF_LAT = 4 cycles later with a `valid` pulse and are held until the next sample.
module feedforward
  import foc_pkg::*;
#(
  parameter real R_OHM  = 1.6,
  parameter real L_H    = 0.002151,
  parameter real PSI_VS = 0.0066070556640625,
  parameter real FS_HZ  = 8000.0,
  parameter real V_BASE = 36.0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  dq_t    i_ref,
  input  angle_t theta_e,
  output dq_t    u,
  output angle_t theta_o,
  output logic   valid
);
  localparam real PI  = 3.14159265358979323846;
  localparam real KW  = 2.0 * PI * FS_HZ / real'(1 << ANG_W);   // rad/s per count per sample
  localparam int  QC  = 30;                                     // fraction bits of constants
  localparam logic signed [63:0] C_R  = 64'(real_to_q(R_OHM / V_BASE, QC));
  localparam logic signed [63:0] C_LF = 64'(real_to_q(L_H * FS_HZ / V_BASE, QC));
  localparam logic signed [63:0] C_WL = 64'(real_to_q(KW * L_H / V_BASE, QC));
  localparam logic signed [63:0] C_WP = 64'(real_to_q(KW * PSI_VS / V_BASE, QC));

  // Sample registers (Register blocks with enable in the block diagram).
  dq_t    i_prev;
  angle_t th_prev;

  dq_t                i_s1, i_s2;
  logic signed [16:0] did_s1, diq_s1;
  logic signed [11:0] dth_s1;
  angle_t             th_s1, th_s2, th_s3;
  logic signed [63:0] wl_s2, pw_s2, rd_s2, rq_s2, ld_s2, lq_s2;
  logic signed [63:0] sd_s3, sq_s3, xd_s3, xq_s3;
  logic               v1, v2, v3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_prev  <= '0;
      th_prev <= '0;
      v1      <= 1'b0;
      v2      <= 1'b0;
      v3      <= 1'b0;
      valid   <= 1'b0;
      u       <= '0;
      theta_o <= '0;
    end else begin
      v1    <= en;
      v2    <= v1;
      v3    <= v2;
      valid <= v3;
      // Stage 1: sample, differences against the previous sample.
      if (en) begin
        i_s1    <= i_ref;
        th_s1   <= theta_e;
        did_s1  <= 17'(i_ref.d) - 17'(i_prev.d);
        diq_s1  <= 17'(i_ref.q) - 17'(i_prev.q);
        dth_s1  <= signed'(theta_e - th_prev);
        i_prev  <= i_ref;
        th_prev <= theta_e;
      end
      // Stage 2: speed terms and products with the constant gains.
      if (v1) begin
        wl_s2 <= 64'(dth_s1) * C_WL;
        pw_s2 <= 64'(dth_s1) * C_WP;
        rd_s2 <= 64'(i_s1.d) * C_R;
        rq_s2 <= 64'(i_s1.q) * C_R;
        ld_s2 <= 64'(did_s1) * C_LF;
        lq_s2 <= 64'(diq_s1) * C_LF;
        i_s2  <= i_s1;
        th_s2 <= th_s1;
      end
      // Stage 3: speed-dependent cross coupling, partial sums.
      if (v2) begin
        xd_s3 <= 64'(i_s2.q) * wl_s2;
        xq_s3 <= 64'(i_s2.d) * wl_s2;
        sd_s3 <= rd_s2 + ld_s2;
        sq_s3 <= rq_s2 + lq_s2 + (pw_s2 <<< FIX_FRAC);
        th_s3 <= th_s2;
      end
      // Stage 4: final sums, round and saturate to Fix_16_13.
      if (v3) begin
        u.d     <= round_sat(sd_s3 - xd_s3, QC);
        u.q     <= round_sat(sq_s3 + xq_s3, QC);
        theta_o <= th_s3;
      end
    end
  end
endmodule
