// tb_inv_park: streams random inputs and angles through the inverse Park transform: V_alpha = V_d cos - V_q sin, V_beta = V_d sin + V_q cos,
// one sample per cycle, and compares every output INV_PARK_LAT cycles later with the floating-point
// result (tolerance 3 LSB: the table and the two products each round once).
module tb_inv_park;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  localparam int  N  = 3000;
  localparam real PI = 3.14159265358979323846;
  logic   clk = 1'b0;
  dq_t    x;
  angle_t th_in;
  ab_t    y;
  dq_t    hx [$];
  angle_t hth [$];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_park dut (.clk, .v_dq(x), .theta(th_in), .v_ab(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N + INV_PARK_LAT; k++) begin
      @(negedge clk);
      if (k >= INV_PARK_LAT) begin
        dq_t h;
        real x1, x2, th, w1, w2;
        h  = hx.pop_front();
        th = 2.0 * PI * real'(hth.pop_front()) / 4096.0;
        x1 = real'(h.d);
        x2 = real'(h.q);
        w1 = x1 * $cos(th) - x2 * $sin(th);
        w2 = x1 * $sin(th) + x2 * $cos(th);
        checks++;
        if (rabs(real'(y.alpha) - w1) > 3.0 || rabs(real'(y.beta) - w2) > 3.0) begin
          failures++;
          if (failures < 10) $display("got %0d %0d want %f %f", y.alpha, y.beta, w1, w2);
        end
      end
      x.d = fix_t'($urandom_range(0, 20000)) - fix_t'(10000);
      x.q = fix_t'($urandom_range(0, 20000)) - fix_t'(10000);
      th_in = angle_t'($urandom);
      hx.push_back(x);
      hth.push_back(th_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
