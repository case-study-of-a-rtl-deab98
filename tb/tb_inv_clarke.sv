// tb_inv_clarke: streams random alpha-beta voltages through the inverse Clarke transform and
// compares the three phase voltages, five cycles later, with the floating-point formulas.
module tb_inv_clarke;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  localparam int N = 2000;
  localparam real K = 56756.0 / 65536.0;   // sqrt(3)/2 as held in the block
  logic clk = 1'b0;
  ab_t  vin;
  abc_t o;
  ab_t  hist [$];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  inv_clarke dut (.clk, .v_ab(vin), .v_abc(o));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N + INV_CLARKE_LAT; k++) begin
      @(negedge clk);
      if (k >= INV_CLARKE_LAT) begin
        ab_t h;
        real wb, wc;
        h  = hist.pop_front();
        wb = -0.5 * real'(h.alpha) + K * real'(h.beta);
        wc = -0.5 * real'(h.alpha) - K * real'(h.beta);
        checks++;
        if (o.a != h.alpha || rabs(real'(o.b) - wb) > 0.51 || rabs(real'(o.c) - wc) > 0.51) begin
          failures++;
          if (failures < 10) $display("in %0d %0d got %0d %0d %0d", h.alpha, h.beta, o.a, o.b, o.c);
        end
      end
      vin.alpha = fix_t'($urandom_range(0, 32000)) - fix_t'(16000);
      vin.beta  = fix_t'($urandom_range(0, 32000)) - fix_t'(16000);
      hist.push_back(vin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
