// pwm_counter: centre-aligned PWM generator for the three inverter legs.
//
// A triangle carrier counts 0, 1, ..., HALF_PERIOD, HALF_PERIOD-1, ..., 1 and repeats, so one
// PWM period is 2*HALF_PERIOD clock cycles: 25000 cycles = 125 us (8 kHz) at the 200 MHz
// (5 ns) clock of the reference design. `sync_bot` is high for the cycle in which the carrier
// is 0 (start of a period) and `sync_top` for the cycle in which it is at HALF_PERIOD (middle).
// At sync_bot the three duty cycles (Fix_16_13, 0.0..1.0) are taken into shadow thresholds
// thr = HALF_PERIOD - round(duty*HALF_PERIOD), so a new duty never changes a running period.
// A leg's high-side output is high while carrier > thr, centred on the carrier peak; its
// high time per period is 2*(HALF_PERIOD - thr) - 1 cycles (0 for duty 0). The low-side output
// is the complement: no dead time is inserted, as in the reference design. The gate outputs are
// registered, so they lag the carrier by one cycle.
module pwm_counter
  import foc_pkg::*;
#(
  parameter int HALF_PERIOD = 12500
) (
  input  logic       clk,
  input  logic       rst_n,
  input  abc_t       duty,
  output logic [15:0] carrier,
  output logic       sync_bot,
  output logic       sync_top,
  output logic [2:0] pwm_hi,     // [0] = a, [1] = b, [2] = c
  output logic [2:0] pwm_lo
);
  localparam logic [15:0] HALF = 16'(HALF_PERIOD);

  logic        up;
  logic [15:0] thr [3];
  fix_t        d [3];

  assign d[0] = duty.a;
  assign d[1] = duty.b;
  assign d[2] = duty.c;

  assign sync_bot = (carrier == 16'd0);
  assign sync_top = (carrier == HALF);

  function automatic logic [15:0] to_thr(input fix_t dc);
    logic [31:0] p;
    logic [15:0] c;
    if (dc <= 0)            c = '0;
    else if (dc >= FIX_ONE) c = HALF;
    else begin
      p = 32'(unsigned'(dc)) * 32'(HALF) + 32'd4096;
      c = 16'(p >> FIX_FRAC);
    end
    return HALF - c;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier <= '0;
      up      <= 1'b1;
      for (int i = 0; i < 3; i++) thr[i] <= HALF;
      pwm_hi  <= '0;
      pwm_lo  <= '1;
    end else begin
      if (up) begin
        carrier <= carrier + 16'd1;
        if (carrier + 16'd1 == HALF) up <= 1'b0;
      end else begin
        carrier <= (carrier == 16'd1) ? 16'd0 : carrier - 16'd1;
        if (carrier == 16'd1) up <= 1'b1;
      end
      if (sync_bot)
        for (int i = 0; i < 3; i++) thr[i] <= to_thr(d[i]);
      for (int i = 0; i < 3; i++) begin
        pwm_hi[i] <= (carrier > thr[i]);
        pwm_lo[i] <= !(carrier > thr[i]);
      end
    end
  end

  // High and low side of a leg are never on together.
  always_ff @(posedge clk) begin
    if (rst_n) assert ((pwm_hi & pwm_lo) == 3'b000) else $error("shoot-through");
  end
endmodule
