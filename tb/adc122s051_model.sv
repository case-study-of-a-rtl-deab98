// adc122s051_model: behavioural model of a two-input 12-bit SPI ADC (ADC122S051 style),
// for testbenches only. Not synthesizable.
//
// On the falling edge of cs_n the input chosen by the address of the previous frame (IN1 after
// power-up) is sampled and the first of 16 output bits (a leading zero) is driven on dout.
// Each further falling SCLK edge drives the next bit: four zeros, then the 12-bit result, MSB
// first. The first eight bits on din, taken on rising SCLK edges, form the control register;
// its bits 5..3 (ADD2..ADD0) select the input of the next conversion, ADD0 choosing IN2.
// `frames` counts completed frames, `sclk_rises` the rising SCLK edges of the last frame.
module adc122s051_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  input  logic [11:0] in1,
  input  logic [11:0] in2,
  output logic        dout,
  output logic [2:0]  addr,
  output int          frames,
  output int          sclk_rises
);
  logic [15:0] word;
  logic [7:0]  ctrl;
  int          nfall;

  initial begin
    addr       = 3'd0;
    dout       = 1'b0;
    frames     = 0;
    sclk_rises = 0;
    word       = '0;
    ctrl       = '0;
    nfall      = 0;
  end

  always @(negedge cs_n) begin
    word       = {4'b0000, addr[0] ? in2 : in1};
    dout       = word[15];
    nfall      = 0;
    sclk_rises = 0;
    ctrl       = '0;
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      nfall = nfall + 1;
      if (nfall >= 2 && nfall <= 16) dout = word[16-nfall];
    end
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      sclk_rises = sclk_rises + 1;
      if (sclk_rises <= 8) ctrl = {ctrl[6:0], din};
    end
  end

  always @(posedge cs_n) begin
    addr   = ctrl[5:3];
    frames = frames + 1;
  end
endmodule
