// sincos_lut: sine and cosine of a 12-bit angle (4096 counts per turn) in Fix_16_13.
//
// One full-period sine table of 4096 words is filled at elaboration from
// sin(2*pi*k/4096), rounded to 13 fraction bits. The cosine is read from the same table a
// quarter turn ahead (address + 1024), so the block is a single ROM with two read ports.
// Timing: the address is registered and the ROM output is registered, giving LUT_LAT = 2
// cycles from theta to sin_o/cos_o, matching the two-cycle Sin and Cos ROMs of the
// reference Park transform. The table size follows the 12-bit angle of the design; the
// full-period (rather than quarter-wave) table is a choice of this implementation.
module sincos_lut
  import foc_pkg::*;
(
  input  logic   clk,
  input  angle_t theta,
  output fix_t   sin_o,
  output fix_t   cos_o
);
  localparam int  N  = 1 << ANG_W;
  localparam real PI = 3.14159265358979323846;

  fix_t rom [N];

  initial begin
    for (int k = 0; k < N; k++)
      rom[k] = fix_t'(real_to_q($sin(2.0 * PI * real'(k) / real'(N)), FIX_FRAC));
  end

  angle_t addr_s, addr_c;

  always_ff @(posedge clk) begin
    addr_s <= theta;
    addr_c <= theta + angle_t'(N / 4);
    sin_o  <= rom[addr_s];
    cos_o  <= rom[addr_c];
  end
endmodule
