// tb_sincos_lut: checks the sine/cosine ROM against sin/cos computed in floating point for
// every one of the 4096 angles, and checks the two-cycle read latency: an angle applied
// before clock edge n is read out at edge n+1.
module tb_sincos_lut;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  localparam real PI = 3.14159265358979323846;
  logic   clk = 1'b0;
  angle_t theta;
  fix_t   s, c;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  sincos_lut dut (.clk, .theta, .sin_o(s), .cos_o(c));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(input fix_t got, input real want, input real tol);
    return (rabs(real'(got) / 8192.0 - want) <= tol);
  endfunction

  initial begin
    theta = '0;
    @(negedge clk);
    for (int k = 0; k < 4096 + 1; k++) begin
      if (k < 4096) theta = angle_t'(k);
      @(negedge clk);
      if (k >= 1) begin
        real a;
        a = 2.0 * PI * real'(k - 1) / 4096.0;
        checks++;
        if (!close(s, $sin(a), 0.6 / 8192.0) || !close(c, $cos(a), 0.6 / 8192.0)) begin
          failures++;
          if (failures < 10) $display("angle %0d: sin %0d cos %0d", k - 1, s, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
