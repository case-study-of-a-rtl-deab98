// tb_adc_scale: converts every 12-bit code and compares with (code - 2048) / 512 A, checks
// that the result appears one cycle after `load` and is held while `load` is low.
module tb_adc_scale;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [11:0] code;
  fix_t        cur;
  logic        valid;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_scale dut (.clk, .rst_n, .load, .code, .current(cur), .valid);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4096; k++) begin
      code = 12'(k);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      code = ~code;                    // must not matter now
      checks++;
      if (!valid || cur != fix_t'((k - 2048) * 16)) begin
        failures++;
        if (failures < 10) $display("code %0d -> %0d", k, cur);
      end
      @(negedge clk);
      checks++;
      if (valid || cur != fix_t'((k - 2048) * 16)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
