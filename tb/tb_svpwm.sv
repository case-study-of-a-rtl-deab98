// tb_svpwm: sweeps the voltage reference vector over random angles and magnitudes (up to
// beyond the linear limit 1/sqrt(3)), one vector per cycle, and checks after three cycles:
//   * the sector equals floor(angle / 60 deg) + 1 (away from sector borders),
//   * in the linear range each duty equals 0.5 + V_x - (Vmax + Vmin)/2, the zero-sequence form of
//     centre-aligned space-vector modulation with equal V0 and V7 times,
//   * beyond it `overmod` is set and the duties are clamped to 0 and 1.
// Every sector and the over-modulation case must occur.
module tb_svpwm;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 5000;

  logic       clk = 1'b0, rst_n = 1'b0, vin = 1'b0;
  abc_t       v, duty;
  logic [2:0] sector;
  logic       overmod, valid;
  int         checks = 0, failures = 0, n_over = 0;
  int         sec_hits [7];
  abc_t       hv [$];
  real        hphi [$];

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction
  function automatic real fx(input fix_t x);
    return real'(x) / 8192.0;
  endfunction
  function automatic real c01(input real x);
    return (x < 0.0) ? 0.0 : (x > 1.0) ? 1.0 : x;
  endfunction

  always #5 clk = ~clk;

  svpwm dut (.clk, .rst_n, .valid_in(vin), .v_abc(v), .duty, .sector, .overmod, .valid);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0;
    for (int s = 0; s < 7; s++) sec_hits[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N + SVPWM_LAT; k++) begin
      if (k >= SVPWM_LAT) begin
        abc_t h;
        real  phi, a, b, c, mx, mn, span, deg;
        int   want_sec;
        h   = hv.pop_front();
        phi = hphi.pop_front();
        a = fx(h.a); b = fx(h.b); c = fx(h.c);
        mx = (a > b) ? ((a > c) ? a : c) : ((b > c) ? b : c);
        mn = (a < b) ? ((a < c) ? a : c) : ((b < c) ? b : c);
        span = mx - mn;
        deg = phi * 180.0 / PI;
        want_sec = int'($floor(deg / 60.0)) + 1;
        checks++;
        if (!valid) failures++;
        if (rabs(deg - 60.0 * $floor(deg / 60.0 + 0.5)) > 0.5 && span > 0.01) begin
          checks++;
          if (int'(sector) != want_sec) begin
            failures++;
            if (failures < 10) $display("deg %f sector %0d want %0d", deg, sector, want_sec);
          end
          sec_hits[sector]++;
        end
        if (span < 1.0 - 3.0 / 8192.0) begin
          checks++;
          if (overmod || rabs(fx(duty.a) - c01(0.5 + a - (mx + mn) / 2.0)) > 1.5 / 8192.0
                      || rabs(fx(duty.b) - c01(0.5 + b - (mx + mn) / 2.0)) > 1.5 / 8192.0
                      || rabs(fx(duty.c) - c01(0.5 + c - (mx + mn) / 2.0)) > 1.5 / 8192.0) begin
            failures++;
            if (failures < 10) $display("v %f %f %f duty %f %f %f", a, b, c, fx(duty.a), fx(duty.b), fx(duty.c));
          end
        end else if (span > 1.0 + 3.0 / 8192.0) begin
          fix_t dmx, dmn;
          n_over++;
          dmx = (mx == a) ? duty.a : (mx == b) ? duty.b : duty.c;
          dmn = (mn == a) ? duty.a : (mn == b) ? duty.b : duty.c;
          checks++;
          if (!overmod || dmx != FIX_ONE || dmn != 0) failures++;
        end
      end
      begin
        real m, phi;
        m   = (k % 5 == 4) ? 0.58 + 0.1 * real'($urandom_range(0, 1000)) / 1000.0
                           : 0.577 * real'($urandom_range(0, 1000)) / 1000.0;
        phi = 2.0 * PI * real'($urandom_range(0, 35999)) / 36000.0;
        v.a = fix_t'($rtoi(8192.0 * m * $cos(phi)));
        v.b = fix_t'($rtoi(8192.0 * m * $cos(phi - 2.0 * PI / 3.0)));
        v.c = fix_t'($rtoi(8192.0 * m * $cos(phi + 2.0 * PI / 3.0)));
        vin = 1'b1;
        hv.push_back(v);
        hphi.push_back(phi);
      end
      @(negedge clk);
    end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (sec_hits[s] == 0) failures++;
      $display("sector %0d hit %0d times", s, sec_hits[s]);
    end
    checks++;
    if (n_over == 0) failures++;
    $display("over-modulated vectors: %0d", n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
