// tb_quad_encoder: drives quadrature sequences of random length forwards and backwards
// (crossing the 4096 wrap), compares the count with a reference counter, checks the direction
// flag and that a double transition is ignored and counted as an error.
module tb_quad_encoder;
  import foc_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       qa = 1'b0, qb = 1'b0;
  angle_t     cnt;
  logic       dir;
  logic [7:0] err;
  int         checks = 0, failures = 0;
  int         pos = 0;        // reference position
  int         phase = 0;      // 0..3 index into the A-leads-B sequence
  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};

  always #5 clk = ~clk;

  quad_encoder dut (.clk, .rst_n, .quad_a(qa), .quad_b(qb), .counter_value(cnt), .dir, .err_cnt(err));

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit up);
    phase = up ? (phase + 1) % 4 : (phase + 3) % 4;
    pos   = up ? pos + 1 : pos - 1;
    {qa, qb} = seq[phase];
    repeat (4) @(negedge clk);
    checks++;
    if (int'(cnt) != (pos & 4095) || dir != up) begin
      failures++;
      if (failures < 10) $display("pos %0d cnt %0d dir %b", pos, cnt, dir);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      int n = $urandom_range(1, 300);
      bit up = (r % 2 == 0);
      for (int i = 0; i < n; i++) step(up);
    end
    // run backwards through zero
    for (int i = 0; i < 5000; i++) step(1'b0);
    // a double transition: both lines change at once
    phase = (phase + 2) % 4;
    {qa, qb} = seq[phase];
    repeat (4) @(negedge clk);
    checks++;
    if (int'(cnt) != (pos & 4095) || err != 8'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
