// tb_feedforward: feeds 800 samples of random reference currents and angle steps (both
// directions, across the 4096 wrap) and compares the outputs with a floating-point model of
//   V_d = (R i_d + L (i_d - i_d_prev)/Ts - L i_q w) / Vdc
//   V_q = (R i_q + L (i_q - i_q_prev)/Ts + L i_d w + Psi w) / Vdc,  w = dtheta*2*pi/(4096*Ts)
// with the default motor constants. Checks the four-cycle latency and the hold between samples.
module tb_feedforward;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real PI = 3.14159265358979323846;
  localparam real R = 1.6, L = 0.002151, PSI = 0.0066070556640625, FS = 8000.0, VB = 36.0;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  dq_t    iref, u;
  angle_t th, th_o;
  logic   valid;
  int     checks = 0, failures = 0, n_wrap = 0;
  real    pd = 0.0, pq = 0.0;
  int     pth = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real fx(input fix_t v);
    return real'(v) / 8192.0;
  endfunction
  function automatic real satr(input real v);
    return (v > 32767.0 / 8192.0) ? 32767.0 / 8192.0 : (v < -4.0) ? -4.0 : v;
  endfunction

  always #5 clk = ~clk;

  feedforward dut (.clk, .rst_n, .en, .i_ref(iref), .theta_e(th), .u, .theta_o(th_o), .valid);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iref = '0; th = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      real id, iq, w, vd, vq;
      int  step, dth, t;
      step = (n < 400) ? int'($urandom_range(0, 200)) : int'($urandom_range(0, 4095)) - 2048;
      t    = (int'(th) + step) & 4095;
      if (int'(th) + step > 4095 || int'(th) + step < 0) n_wrap++;
      th     = angle_t'(t);
      iref.d = fix_t'($urandom_range(0, 16000)) - fix_t'(8000);
      iref.q = fix_t'($urandom_range(0, 16000)) - fix_t'(8000);
      if (n % 7 == 0) iref.d = fix_t'(int'(pd * 8192.0));   // zero derivative now and then
      id  = fx(iref.d);
      iq  = fx(iref.q);
      dth = t - pth;
      if (dth > 2047) dth -= 4096;
      if (dth < -2048) dth += 4096;
      w   = real'(dth) * 2.0 * PI * FS / 4096.0;
      vd  = satr((R * id + L * FS * (id - pd) - L * iq * w) / VB);
      vq  = satr((R * iq + L * FS * (iq - pq) + L * id * w + PSI * w) / VB);
      pd  = id; pq = iq; pth = t;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      repeat (3) begin
        checks++;
        if (valid) failures++;
        @(negedge clk);
      end
      checks++;
      if (!valid || rabs(fx(u.d) - vd) > 2.0 / 8192.0 || rabs(fx(u.q) - vq) > 2.0 / 8192.0
          || th_o != angle_t'(t)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %f %f want %f %f", n, fx(u.d), fx(u.q), vd, vq);
      end
      repeat ($urandom_range(0, 2)) begin
        dq_t held;
        held = u;
        @(negedge clk);
        checks++;
        if (u != held) failures++;
      end
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("angle wraps: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
