// tb_pwm_counter: runs the PWM generator with a short carrier (HALF_PERIOD = 100) for 300
// periods. Each period it checks the period length (sync_bot every 200 cycles), sync_top at
// the carrier peak, and the high time of every leg against 2*(HALF - thr) - 1 with
// thr = HALF - round(duty*HALF), using the duty present at the period start. The duties are
// changed in the middle of each period, which must only affect the next period (shadow
// registers); the low-side outputs must be the complements. Duties 0 and 1 are included.
module tb_pwm_counter;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int HALF = 100;
  logic        clk = 1'b0, rst_n = 1'b0;
  abc_t        duty;
  logic [15:0] carrier;
  logic        sync_bot, sync_top;
  logic [2:0]  hi, lo;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_counter #(.HALF_PERIOD(HALF)) dut (
    .clk, .rst_n, .duty, .carrier, .sync_bot, .sync_top, .pwm_hi(hi), .pwm_lo(lo)
  );

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_high(input fix_t d);
    int c, thr;
    if (d <= 0) c = 0;
    else if (d >= FIX_ONE) c = HALF;
    else c = (int'(d) * HALF + 4096) >>> 13;
    thr = HALF - c;
    return (thr >= HALF) ? 0 : 2 * (HALF - thr) - 1;
  endfunction

  function automatic fix_t rand_duty();
    int r = $urandom_range(0, 9);
    if (r == 0) return '0;
    if (r == 1) return FIX_ONE;
    return fix_t'($urandom_range(0, 8192));
  endfunction

  initial begin
    duty = '{a: fix_t'(4096), b: fix_t'(1000), c: fix_t'(8000)};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!sync_bot) @(negedge clk);
    for (int p = 0; p < 300; p++) begin
      int exp_h [3], got_h [3];
      checks++;
      if (!sync_bot || carrier != 0) failures++;
      exp_h[0] = expect_high(duty.a);
      exp_h[1] = expect_high(duty.b);
      exp_h[2] = expect_high(duty.c);
      got_h = '{0, 0, 0};
      @(negedge clk);
      for (int i = 2; i <= 2 * HALF; i++) begin
        @(negedge clk);
        for (int l = 0; l < 3; l++) got_h[l] += int'(hi[l]);
        checks++;
        if (lo != ~hi) failures++;
        if (i < 2 * HALF && sync_bot) failures++;
        if (i == HALF) begin
          checks++;
          if (!sync_top || carrier != 16'(HALF)) failures++;
        end else if (sync_top) failures++;
        if (i == HALF / 2) duty = '{a: rand_duty(), b: rand_duty(), c: rand_duty()};
      end
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (got_h[l] != exp_h[l]) begin
          failures++;
          if (failures < 10) $display("period %0d leg %0d high %0d want %0d", p, l, got_h[l], exp_h[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
