// tb_clarke: streams random current pairs through the Clarke transform, one per cycle, and
// compares each output, five cycles later, with i_alpha = i_a and
// i_beta = (i_a + 2 i_b) * 0.57733154296875 computed in floating point.
module tb_clarke;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  localparam int N = 2000;
  logic clk = 1'b0;
  fix_t ia, ib;
  ab_t  o;
  fix_t hist_a [$], hist_b [$];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clarke dut (.clk, .i_a(ia), .i_b(ib), .i_ab(o));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N + CLARKE_LAT; k++) begin
      @(negedge clk);
      if (k >= CLARKE_LAT) begin
        fix_t a, b;
        real  want;
        a = hist_a.pop_front();
        b = hist_b.pop_front();
        want = (real'(a) + 2.0 * real'(b)) * 0.57733154296875;
        if (want > 32767.0) want = 32767.0;
        if (want < -32768.0) want = -32768.0;
        checks++;
        if (o.alpha != a || rabs(real'(o.beta) - want) > 0.51) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d got %0d/%0d want beta %f", a, b, o.alpha, o.beta, want);
        end
      end
      ia = fix_t'($urandom_range(0, 24000)) - fix_t'(12000);
      ib = fix_t'($urandom_range(0, 24000)) - fix_t'(12000);
      if (k == 0) begin ia = 16'sh7FFF; ib = 16'sh7FFF; end   // saturating corner
      hist_a.push_back(ia);
      hist_b.push_back(ib);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
