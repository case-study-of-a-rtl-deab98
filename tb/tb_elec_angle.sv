// tb_elec_angle: random mechanical counts and offsets; checks
// theta_e = (4*theta_mec + offset) mod 4096 one cycle later.
module tb_elec_angle;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic   clk = 1'b0, rst_n = 1'b0;
  angle_t mec, off, te;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  elec_angle dut (.clk, .rst_n, .theta_mec(mec), .theta_offset(off), .theta_e(te));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mec = '0; off = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      int want;
      mec = angle_t'($urandom);
      off = (k < 1000) ? angle_t'(1024) : angle_t'($urandom);
      want = (4 * int'(mec) + int'(off)) % 4096;
      @(negedge clk);
      checks++;
      if (int'(te) != want) begin
        failures++;
        if (failures < 10) $display("mec %0d off %0d -> %0d want %0d", mec, off, te, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
