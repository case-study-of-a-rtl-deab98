// tb_park: streams random inputs and angles through the Park transform: I_d = i_alpha cos + i_beta sin, I_q = -i_alpha sin + i_beta cos,
// one sample per cycle, and compares every output PARK_LAT cycles later with the floating-point
// result (tolerance 3 LSB: the table and the two products each round once).
module tb_park;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  localparam int  N  = 3000;
  localparam real PI = 3.14159265358979323846;
  logic   clk = 1'b0;
  ab_t    x;
  angle_t th_in;
  dq_t    y;
  ab_t    hx [$];
  angle_t hth [$];
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  park dut (.clk, .i_ab(x), .theta(th_in), .i_dq(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N + PARK_LAT; k++) begin
      @(negedge clk);
      if (k >= PARK_LAT) begin
        ab_t h;
        real x1, x2, th, w1, w2;
        h  = hx.pop_front();
        th = 2.0 * PI * real'(hth.pop_front()) / 4096.0;
        x1 = real'(h.alpha);
        x2 = real'(h.beta);
        w1 = x1 * $cos(th) + x2 * $sin(th);
        w2 = -x1 * $sin(th) + x2 * $cos(th);
        checks++;
        if (rabs(real'(y.d) - w1) > 3.0 || rabs(real'(y.q) - w2) > 3.0) begin
          failures++;
          if (failures < 10) $display("got %0d %0d want %f %f", y.d, y.q, w1, w2);
        end
      end
      x.alpha = fix_t'($urandom_range(0, 20000)) - fix_t'(10000);
      x.beta = fix_t'($urandom_range(0, 20000)) - fix_t'(10000);
      th_in = angle_t'($urandom);
      hx.push_back(x);
      hth.push_back(th_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
