// tb_foc_top: end-to-end test of the FOC loop at its default sizes (200 MHz clock, 125 us PWM
// period, 8 kHz control rate), 96 PWM periods.
//
// Around the design: two ADC122S051 models on the SPI bus return phase-current codes that
// change every period, and a quadrature driver turns the encoder forwards for 48 periods and
// backwards after that, in steps of different sizes. The current references change five
// times and the gains once.
// At every sample instant (carrier valley) the testbench computes, in floating point and
// independently of the RTL, the whole control law from the same inputs: Clarke, Park, both
// PI regulators with their clamp, the feed forward, inverse Park, inverse Clarke and the
// space-vector duty cycles. The measured high time of each of the three gate outputs in the
// following PWM period must match the model within 20 cycles of 25000.
// It also checks the loop latency (28 cycles from the valley to `loop_done`), that low-side
// gates are complements, and counts the mechanisms of the loop, each of which must occur:
// ADC frames, encoder counting up and down, all six SVPWM sectors, the PI clamp active and
// inactive, over-modulation, a non-zero speed in the feed forward, and angle wrap-around.
module tb_foc_top;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 100ps;

  localparam real PI    = 3.14159265358979323846;
  localparam int  HALF  = 12500;
  localparam int  NPER  = 96;
  localparam real LIM   = 0.57735;
  localparam real R = 1.6, L = 0.002151, PSI = 0.0066070556640625, FS = 8000.0, VB = 36.0;
  localparam int  LOOP_LATENCY = 28;
  localparam int  TOL   = 20;

  logic       clk = 1'b0, rst_n = 1'b0;
  fix_t       id_ref, iq_ref, kp, ki_ts;
  angle_t     theta_offset;
  logic [2:0] adc_ch;
  logic       spi_uin, spi_vin, spi_uout, spi_vout, spi_clk, spi_cs_n;
  logic       quad_a = 1'b0, quad_b = 1'b0;
  logic [2:0] pwm_hi, pwm_lo, sector;
  fix_t       i_d, i_q;
  angle_t     theta_out, theta_mec;
  abc_t       duty;
  logic [1:0] pi_sat;
  logic       overmod, loop_done, sync_bot, sync_top, enc_dir;
  logic [7:0] enc_err;
  logic [15:0] carrier;

  logic [11:0] code_a = 12'd2048, code_b = 12'd2048;   // present ADC inputs
  logic [11:0] conv_a = 12'd2048, conv_b = 12'd2048;   // last converted values
  logic [2:0]  addr_u, addr_v;
  int          frames_u, frames_v, rises_u, rises_v;

  int   checks = 0, failures = 0;
  int   cyc = 0, t_sample = 0, nsample = 0;
  int   pos = 0, phase = 0;
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  // model state
  real  integ_d = 0.0, integ_q = 0.0, pref_d = 0.0, pref_q = 0.0;
  int   pth = 0;
  int   exp_cnt [NPER + 4][3];
  int   acc [3] = '{0, 0, 0};
  int   nperiod = 0;

  // mechanism counters
  int   m_up = 0, m_down = 0, m_sat = 0, m_lin = 0, m_over = 0, m_speed = 0, m_wrap = 0;
  int   m_sec [7] = '{0, 0, 0, 0, 0, 0, 0};
  int   n_compared = 0;

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc++;

  foc_top dut (
    .clk, .rst_n, .id_ref, .iq_ref, .kp, .ki_ts, .theta_offset, .adc_ch,
    .spi_uin, .spi_vin, .spi_uout, .spi_vout, .spi_clk, .spi_cs_n,
    .quad_a, .quad_b, .pwm_hi, .pwm_lo,
    .i_d, .i_q, .theta_out, .duty, .sector, .pi_sat, .overmod, .loop_done,
    .sync_bot, .sync_top, .theta_mec, .enc_dir, .enc_err, .carrier
  );

  adc122s051_model adc_u (.cs_n(spi_cs_n), .sclk(spi_clk), .din(spi_uout), .in1(code_a),
                          .in2(12'hABC), .dout(spi_uin), .addr(addr_u), .frames(frames_u),
                          .sclk_rises(rises_u));
  adc122s051_model adc_v (.cs_n(spi_cs_n), .sclk(spi_clk), .din(spi_vout), .in1(code_b),
                          .in2(12'h123), .dout(spi_vin), .addr(addr_v), .frames(frames_v),
                          .sclk_rises(rises_v));

  initial begin
    #(5.0 * 2.0 * HALF * (NPER + 6));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx(input fix_t v);
    return real'(v) / 8192.0;
  endfunction
  function automatic real clampr(input real v, input real lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction
  function automatic real rmax3(input real a, input real b, input real c);
    return (a > b) ? ((a > c) ? a : c) : ((b > c) ? b : c);
  endfunction
  function automatic real rmin3(input real a, input real b, input real c);
    return (a < b) ? ((a < c) ? a : c) : ((b < c) ? b : c);
  endfunction
  function automatic int count_of(input real d);
    int c;
    if (d <= 0.0) return 0;
    if (d >= 1.0) c = HALF;
    else c = int'($floor(d * HALF + 0.5));
    return (c == 0) ? 0 : 2 * c - 1;
  endfunction

  // Floating-point model of one control sample; returns the expected gate high times.
  task automatic model_sample(output int cnt [3]);
    real ia, ib, al, be, th, id, iq, ed, eq, ud, uq, w, fd, fq, vd, vq, va_, vb_, vva, vvb, vvc;
    real mx, mn, mid, t7, d [3], rd, rq;
    int  the, dth;
    ia  = (real'(conv_a) - 2048.0) / 512.0;
    ib  = (real'(conv_b) - 2048.0) / 512.0;
    al  = ia;
    be  = (ia + 2.0 * ib) / $sqrt(3.0);
    // At the very first valley after reset the electrical-angle register still holds 0.
    the = (nsample == 0) ? 0 : (4 * pos + int'(theta_offset)) & 4095;
    nsample++;
    th  = 2.0 * PI * real'(the) / 4096.0;
    id  = al * $cos(th) + be * $sin(th);
    iq  = -al * $sin(th) + be * $cos(th);
    rd  = fx(id_ref);
    rq  = fx(iq_ref);
    // PI regulators
    ed = rd - id;
    eq = rq - iq;
    integ_d = clampr(integ_d + fx(ki_ts) * ed, LIM);
    integ_q = clampr(integ_q + fx(ki_ts) * eq, LIM);
    ud = clampr(fx(kp) * ed + integ_d, LIM);
    uq = clampr(fx(kp) * eq + integ_q, LIM);
    // feed forward
    dth = the - pth;
    if (dth > 2047) dth -= 4096;
    if (dth < -2048) dth += 4096;
    if (dth != 0) m_speed++;
    if (the < pth && dth > 0 || the > pth && dth < 0) m_wrap++;
    w  = real'(dth) * 2.0 * PI * FS / 4096.0;
    fd = (R * rd + L * FS * (rd - pref_d) - L * rq * w) / VB;
    fq = (R * rq + L * FS * (rq - pref_q) + L * rd * w + PSI * w) / VB;
    pref_d = rd; pref_q = rq; pth = the;
    vd = clampr(ud + fd, 4.0);
    vq = clampr(uq + fq, 4.0);
    // inverse Park, inverse Clarke
    va_ = vd * $cos(th) - vq * $sin(th);
    vb_ = vd * $sin(th) + vq * $cos(th);
    vva = va_;
    vvb = -0.5 * va_ + $sqrt(3.0) / 2.0 * vb_;
    vvc = -0.5 * va_ - $sqrt(3.0) / 2.0 * vb_;
    // centre-aligned space vector duty cycles
    mx  = rmax3(vva, vvb, vvc);
    mn  = rmin3(vva, vvb, vvc);
    t7  = (1.0 - (mx - mn)) / 2.0;
    if (t7 < 0.0) t7 = 0.0;
    d[0] = t7 + vva - mn;
    d[1] = t7 + vvb - mn;
    d[2] = t7 + vvc - mn;
    for (int l = 0; l < 3; l++) cnt[l] = count_of(d[l]);
  endtask

  // Sample instants, latency, gate high-time measurement.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (pwm_lo != ~pwm_hi) failures++;
      for (int l = 0; l < 3; l++) acc[l] += int'(pwm_hi[l]);
      if (sync_top) begin
        conv_a = code_a;
        conv_b = code_b;
      end
      if (sync_bot) begin
        int c [3];
        // the period that just ended was driven by the sample two valleys back
        if (nperiod >= 2) begin
          for (int l = 0; l < 3; l++) begin
            checks++;
            if (acc[l] > exp_cnt[nperiod - 2][l] + TOL || acc[l] < exp_cnt[nperiod - 2][l] - TOL) begin
              failures++;
              if (failures < 12)
                $display("period %0d leg %0d: high %0d cycles, model %0d", nperiod - 1, l, acc[l],
                         exp_cnt[nperiod - 2][l]);
            end
          end
          n_compared++;
        end
        acc = '{0, 0, 0};
        checks++;
        if (int'(theta_mec) != (pos & 4095)) failures++;
        model_sample(c);
        exp_cnt[nperiod] = c;
        t_sample = cyc;
        nperiod++;
      end
      if (loop_done) begin
        checks++;
        if (cyc - t_sample != LOOP_LATENCY) begin
          failures++;
          $display("loop latency %0d cycles", cyc - t_sample);
        end
        m_sec[sector]++;
        if (pi_sat != 2'b00) m_sat++; else m_lin++;
        if (overmod) m_over++;
        if (enc_dir) m_up++; else m_down++;
      end
    end
  end

  task automatic enc_step(input bit up);
    phase = up ? (phase + 1) % 4 : (phase + 3) % 4;
    pos   = up ? pos + 1 : pos - 1;
    {quad_a, quad_b} = seq[phase];
    repeat (4) @(negedge clk);
  endtask

  initial begin
    static int steps [4] = '{5, 40, 110, 12};
    id_ref = '0; iq_ref = fix_t'(8192); kp = fix_t'(1638); ki_ts = fix_t'(410);
    theta_offset = angle_t'(1024); adc_ch = 3'd0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < NPER + 2; p++) begin
      @(negedge clk);
      while (!sync_bot) @(negedge clk);
      repeat (200) @(negedge clk);
      // new references now and then
      if (p == 12) begin iq_ref = fix_t'(-4096); end
      if (p == 24) begin id_ref = fix_t'(2458); iq_ref = fix_t'(2048); end
      if (p == 36) begin id_ref = fix_t'(-1000); iq_ref = fix_t'(6000); end
      if (p == 60) begin kp = fix_t'(4096); ki_ts = fix_t'(1200); end
      if (p == 72) begin id_ref = '0; iq_ref = fix_t'(-8192); end
      // new phase currents for the next conversion
      code_a = 12'(2048 + $urandom_range(0, 800) - 400);
      code_b = 12'(2048 + $urandom_range(0, 800) - 400);
      // move the rotor
      for (int s = 0; s < steps[p % 4]; s++) enc_step(p < NPER / 2);
    end
    // mechanisms
    checks++;
    if (frames_u < NPER || frames_v < NPER) failures++;
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (m_sec[s] == 0) failures++;
    end
    checks++; if (m_up == 0 || m_down == 0) failures++;
    checks++; if (m_sat == 0 || m_lin == 0) failures++;
    checks++; if (m_over == 0) failures++;
    checks++; if (m_speed == 0) failures++;
    checks++; if (m_wrap == 0) failures++;
    checks++; if (n_compared < NPER - 2) failures++;
    $display("ADC frames %0d, periods compared %0d", frames_u, n_compared);
    $display("sectors %0d %0d %0d %0d %0d %0d", m_sec[1], m_sec[2], m_sec[3], m_sec[4], m_sec[5], m_sec[6]);
    $display("encoder up %0d down %0d, PI clamp %0d / linear %0d, over-modulation %0d, speed %0d, wraps %0d",
             m_up, m_down, m_sat, m_lin, m_over, m_speed, m_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
