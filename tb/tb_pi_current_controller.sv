// tb_pi_current_controller: runs the d and q regulators for 600 samples with random references,
// measurements and gains and compares each output with a floating-point model of
//   I += KiTs*e, clamped to +-LIMIT;  u = clamp(Kp*e + I)
// Checks the two-cycle latency of `valid`, that outputs hold between samples, and that the
// anti-wind-up clamp is both reached and left again (counted through `sat`).
module tb_pi_current_controller;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real LIM = 0.57735;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  dq_t        iref, imeas, u;
  fix_t       kp, kits;
  logic       valid;
  logic [1:0] sat;
  int         checks = 0, failures = 0, n_sat = 0, n_lin = 0;
  real        integ_d = 0.0, integ_q = 0.0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real clampr(input real v);
    return (v > LIM) ? LIM : (v < -LIM) ? -LIM : v;
  endfunction
  function automatic real fx(input fix_t v);
    return real'(v) / 8192.0;
  endfunction

  always #5 clk = ~clk;

  pi_current_controller dut (
    .clk, .rst_n, .en, .i_ref(iref), .i_meas(imeas), .kp, .ki_ts(kits), .u, .valid, .sat
  );

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model(input fix_t r, input fix_t m, inout real integ, output real uo, output bit s);
    real e, in_raw, u_raw;
    e      = fx(r) - fx(m);
    in_raw = integ + fx(kits) * e;
    integ  = clampr(in_raw);
    u_raw  = fx(kp) * e + integ;
    uo     = clampr(u_raw);
    s      = (rabs(in_raw) > LIM) || (rabs(u_raw) > LIM);
  endtask

  initial begin
    iref = '0; imeas = '0; kp = '0; kits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      real ud, uq;
      bit  sd, sq;
      if (n % 100 == 0) begin
        kp   = fix_t'($urandom_range(400, 8000));
        kits = fix_t'($urandom_range(20, 1500));
      end
      // slowly varying references with noise so the integrators wander in and out of the clamp
      iref.d  = fix_t'(int'(2000.0 * $sin(real'(n) / 15.0)));
      iref.q  = fix_t'(int'(3000.0 * $cos(real'(n) / 23.0)));
      imeas.d = fix_t'($urandom_range(0, 4000)) - fix_t'(2000);
      imeas.q = fix_t'($urandom_range(0, 4000)) - fix_t'(2000);
      en = 1'b1;
      model(iref.d, imeas.d, integ_d, ud, sd);
      model(iref.q, imeas.q, integ_q, uq, sq);
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (valid) failures++;
      @(negedge clk);
      checks++;
      if (!valid || rabs(fx(u.d) - ud) > 2.0 / 8192.0 || rabs(fx(u.q) - uq) > 2.0 / 8192.0) begin
        failures++;
        if (failures < 10) $display("n=%0d got %f %f want %f %f", n, fx(u.d), fx(u.q), ud, uq);
      end
      if (sat[1] || sat[0]) n_sat++; else n_lin++;
      checks++;
      if (sat != {sd, sq} && rabs(rabs(ud) - LIM) > 1e-3 && rabs(rabs(uq) - LIM) > 1e-3
          && rabs(rabs(integ_d) - LIM) > 1e-3 && rabs(rabs(integ_q) - LIM) > 1e-3) failures++;
      repeat ($urandom_range(0, 3)) begin
        dq_t held;
        held = u;
        @(negedge clk);
        checks++;
        if (u != held || valid) failures++;
      end
    end
    checks++;
    if (n_sat == 0 || n_lin == 0) begin
      failures++;
      $display("clamp mechanism not exercised: sat %0d linear %0d", n_sat, n_lin);
    end
    $display("samples with clamp active: %0d, linear: %0d", n_sat, n_lin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
