// elec_angle: electrical rotor angle from the mechanical encoder count.
//
//   theta_e = (POLE_PAIRS * theta_mec + theta_offset) mod 4096
//
// theta_mec is the 12-bit encoder count (4096 per mechanical turn); multiplying by the number
// of pole pairs gives the angle of the rotor flux, and theta_offset aligns the encoder zero
// with the d axis (the reference design feeds a constant quarter turn, 4096/4). The modulo is
// the natural wrap of the 12-bit result. Registered: one cycle of latency. The default of four
// pole pairs is an assumption about the 57BLS01 motor, not a value of the reference design.
module elec_angle
  import foc_pkg::*;
#(
  parameter int POLE_PAIRS = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  angle_t theta_mec,
  input  angle_t theta_offset,
  output angle_t theta_e
);
  logic [31:0] prod;
  assign prod = 32'(theta_mec) * 32'(POLE_PAIRS);

  always_ff @(posedge clk) begin
    if (!rst_n) theta_e <= '0;
    else        theta_e <= angle_t'(prod) + theta_offset;
  end
endmodule
