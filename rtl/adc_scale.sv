// adc_scale: converts a 12-bit phase-current ADC code into a current in Fix_16_13 ampere.
//
//   i = (code - ZERO_CODE) * AMP_PER_LSB
//
// The current sensor of the power board is assumed to be bipolar around mid-scale, so the
// default zero is code 2048, and its gain is a parameter (default 1/512 A per LSB, which maps
// the full ADC range onto the +-4 A range of Fix_16_13). Both values are this
// implementation's assumptions, to be set from the sensor actually used. The gain is held as a
// 16-fraction-bit constant; the result is rounded and saturated. `load` (the ADC's
// conversion_ready) registers a new result one cycle later, flagged by `valid`.
module adc_scale
  import foc_pkg::*;
#(
  parameter int  ZERO_CODE   = 2048,
  parameter real AMP_PER_LSB = 0.001953125
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [11:0] code,
  output fix_t        current,
  output logic        valid
);
  localparam logic signed [31:0] K_Q = 32'(real_to_q(AMP_PER_LSB * (2.0 ** FIX_FRAC), 16));

  logic signed [13:0] centred;
  logic signed [63:0] prod;

  always_comb begin
    centred = 14'(signed'({1'b0, code})) - 14'(ZERO_CODE);
    prod    = 64'(centred) * 64'(K_Q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      current <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= load;
      if (load) current <= round_sat(prod, 16);
    end
  end
endmodule
