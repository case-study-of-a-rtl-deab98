// spi_adc: SPI master that reads the two phase-current ADCs (ADC122S051) in one frame.
//
// The two converters share chip select and serial clock and have their own data lines, so both
// phase currents are sampled at the same instant. A `conversion` pulse (the carrier peak in the
// loop) starts a frame: CS falls, then 16 SCLK cycles follow, each a falling edge and, SCLK_HALF
// clock cycles later, a rising edge. On every rising edge one bit of each converter's DOUT
// (spi_uin, spi_vin) is shifted in; the 16-bit word holds four leading zeros and the 12-bit
// result, MSB first. The control word driven on both DIN lines (spi_uout, spi_vout), MSB first
// and changed on the falling edges, carries the input-select bits ADD2..ADD0 = adc_ch in its
// bits 13..11; the converter uses them for the following conversion. After the 16th rising
// edge and half a SCLK period CS rises, the two results appear on data_out_u/data_out_v and
// conversion_ready pulses for one cycle. SCLK idles high. With SCLK_HALF = 32 at 200 MHz the
// SCLK is 3.125 MHz; a frame lasts 33*SCLK_HALF + 1 cycles from `conversion` to
// conversion_ready (1057 cycles, 5.3 us). Only the low 12 bits of each 16-bit word are used.
// The port list follows the reference design's ADC block; the frame details follow the
// converter's serial format, and the clock rate is this implementation's choice.
module spi_adc #(
  parameter int SCLK_HALF = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        conversion,
  input  logic        spi_uin,
  input  logic        spi_vin,
  input  logic [2:0]  adc_ch,
  output logic        spi_uout,
  output logic        spi_vout,
  output logic        spi_clk,
  output logic        spi_cs_n,
  output logic        conversion_ready,
  output logic [11:0] data_out_u,
  output logic [11:0] data_out_v,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_LOW, S_HIGH, S_STOP} state_e;

  state_e      state;
  logic [$clog2(SCLK_HALF+1)-1:0] tmr;
  logic [3:0]  nbit;
  logic [15:0] ctrl, sh_u, sh_v;
  logic        tick;

  assign tick = (32'(tmr) == SCLK_HALF - 1);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      tmr              <= '0;
      nbit             <= '0;
      ctrl             <= '0;
      sh_u             <= '0;
      sh_v             <= '0;
      spi_clk          <= 1'b1;
      spi_cs_n         <= 1'b1;
      spi_uout         <= 1'b0;
      spi_vout         <= 1'b0;
      conversion_ready <= 1'b0;
      data_out_u       <= '0;
      data_out_v       <= '0;
    end else begin
      conversion_ready <= 1'b0;
      tmr <= (state == S_IDLE || tick) ? '0 : tmr + 1'b1;
      case (state)
        S_IDLE: if (conversion) begin
          spi_cs_n <= 1'b0;
          ctrl     <= {2'b00, adc_ch, 11'b0};
          nbit     <= '0;
          state    <= S_START;
        end
        S_START, S_HIGH: if (tick) begin
          spi_clk  <= 1'b0;
          spi_uout <= ctrl[15];
          spi_vout <= ctrl[15];
          ctrl     <= {ctrl[14:0], 1'b0};
          state    <= S_LOW;
        end
        S_LOW: if (tick) begin
          spi_clk <= 1'b1;
          sh_u    <= {sh_u[14:0], spi_uin};
          sh_v    <= {sh_v[14:0], spi_vin};
          nbit    <= nbit + 1'b1;
          state   <= (nbit == 4'd15) ? S_STOP : S_HIGH;
        end
        S_STOP: if (tick) begin
          spi_cs_n         <= 1'b1;
          spi_uout         <= 1'b0;
          spi_vout         <= 1'b0;
          data_out_u       <= sh_u[11:0];
          data_out_v       <= sh_v[11:0];
          conversion_ready <= 1'b1;
          state            <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SCLK only toggles while the converters are selected.
  always_ff @(posedge clk) begin
    if (rst_n && spi_cs_n) assert (spi_clk) else $error("SCLK moved with CS high");
  end
endmodule
