// tb_spi_adc: connects the SPI master to two behavioural ADC122S051 models (sharing CS and
// SCLK, as on the power board) and runs 200 frames with random input values and random
// channel selections. Checks for each frame: both 12-bit results equal the value of the input
// that the previous frame selected (IN1 after power-up), the converters saw the channel sent
// in this frame, exactly 16 SCLK rising edges, 64 clock cycles per SCLK period, and
// 33*SCLK_HALF + 1 = 1057 cycles from `conversion` to `conversion_ready`. A second
// `conversion` pulse during a frame must be ignored.
module tb_spi_adc;
  timeunit 1ns; timeprecision 1ps;

  localparam int SH = 32;
  logic        clk = 1'b0, rst_n = 1'b0, conv = 1'b0;
  logic        uin, vin, uout, vout, sclk, cs_n, ready, busy;
  logic [2:0]  ch;
  logic [11:0] du, dv;
  logic [11:0] u1, u2, v1, v2;
  logic [2:0]  addr_u, addr_v;
  int          frames_u, frames_v, rises_u, rises_v;
  int          checks = 0, failures = 0;
  int          last_rise = -1, cyc = 0, bad_period = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  spi_adc #(.SCLK_HALF(SH)) dut (
    .clk, .rst_n, .conversion(conv), .spi_uin(uin), .spi_vin(vin), .adc_ch(ch),
    .spi_uout(uout), .spi_vout(vout), .spi_clk(sclk), .spi_cs_n(cs_n),
    .conversion_ready(ready), .data_out_u(du), .data_out_v(dv), .busy
  );

  adc122s051_model adc_u (.cs_n, .sclk, .din(uout), .in1(u1), .in2(u2), .dout(uin),
                          .addr(addr_u), .frames(frames_u), .sclk_rises(rises_u));
  adc122s051_model adc_v (.cs_n, .sclk, .din(vout), .in1(v1), .in2(v2), .dout(vin),
                          .addr(addr_v), .frames(frames_v), .sclk_rises(rises_v));

  // SCLK period while selected
  always @(posedge sclk) begin
    if (!cs_n) begin
      if (last_rise >= 0 && rises_u > 1 && cyc - last_rise != 2 * SH) bad_period++;
      last_rise = cyc;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] prev_ch;
    int         f0;
    ch = 3'd0; u1 = '0; u2 = '0; v1 = '0; v2 = '0;
    prev_ch = 3'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    f0 = frames_u;
    for (int f = 0; f < 200; f++) begin
      int t0, n;
      u1 = 12'($urandom); u2 = 12'($urandom); v1 = 12'($urandom); v2 = 12'($urandom);
      ch = (f % 3 == 0) ? 3'd0 : 3'($urandom_range(0, 1));
      last_rise = -1;
      conv = 1'b1;
      @(negedge clk);
      conv = 1'b0;
      t0 = cyc;
      n  = 1;
      while (!ready) begin
        @(negedge clk);
        n++;
        if (n == 300) begin
          conv = 1'b1;             // ignored: frame in progress
          @(negedge clk);
          conv = 1'b0;
          n++;
        end
        if (n > 5000) break;
      end
      checks++;
      if (n != 33 * SH + 1) begin
        failures++;
        $display("frame %0d: %0d cycles to ready", f, n);
      end
      checks++;
      if (du != (prev_ch[0] ? u2 : u1) || dv != (prev_ch[0] ? v2 : v1)) begin
        failures++;
        if (failures < 10) $display("frame %0d: got %h %h", f, du, dv);
      end
      checks++;
      if (addr_u != ch || addr_v != ch || rises_u != 16 || rises_v != 16) failures++;
      prev_ch = ch;
      repeat ($urandom_range(2, 40)) @(negedge clk);
      checks++;
      if (busy || !cs_n || !sclk) failures++;
    end
    checks++;
    if (frames_u - f0 != 200 || frames_v - f0 != 200 || bad_period != 0) failures++;
    $display("frames %0d %0d, SCLK period errors %0d", frames_u - f0, frames_v - f0, bad_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
