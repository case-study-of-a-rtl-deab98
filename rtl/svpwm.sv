// svpwm: space-vector modulator turning the three phase voltage references into duty cycles.
//
// Inputs are V_a, V_b, V_c in per unit of the DC-link voltage. The sector (1..6, numbered
// counter-clockwise from the V4 = (1,0,0) vector on the a axis) is found from the signs of the
// three line-to-line differences V_a-V_b, V_b-V_c, V_c-V_a, which order the phases. In the
// sector the two adjacent active vectors are applied for
//   T1/T = Vmax - Vmid,  T2/T = Vmid - Vmin,
// and the rest of the period is split equally between the zero vectors V0 = (0,0,0) and
// V7 = (1,1,1): T7/T = T0/T = (1 - T1/T - T2/T) / 2. For the centre-aligned pattern this gives
// the on-times  d_min = T7/T,  d_mid = T7/T + T2/T,  d_max = T7/T + T2/T + T1/T  (sector 1:
// d_a = (T4+T6+T7)/T, d_b = (T6+T7)/T, d_c = T7/T). Outside the linear range (a reference
// longer than 1/sqrt(3)) the zero time is clamped to 0 and the duties to [0,1]; `overmod`
// flags this. That clamping is this implementation's choice.
// Timing: three pipeline stages, duty and sector valid SVPWM_LAT = 3 cycles after v_abc;
// `valid` follows `valid_in` with the same latency.
module svpwm
  import foc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_in,
  input  abc_t       v_abc,
  output abc_t       duty,
  output logic [2:0] sector,
  output logic       overmod,
  output logic       valid
);
  typedef enum logic [1:0] {PH_A = 2'd0, PH_B = 2'd1, PH_C = 2'd2} phase_e;

  localparam logic signed [17:0] ONE = 18'sd8192;

  // Stage 1
  abc_t        v_s1;
  logic [2:0]  sgn_s1;          // {Va>=Vb, Vb>=Vc, Vc>=Va}
  logic        v1, v2;
  // Stage 2
  logic [2:0]          sec_s2;
  phase_e              pmax_s2, pmid_s2, pmin_s2;
  logic signed [17:0]  t1_s2, t2_s2, t7_s2;
  logic                om_s2;

  // Combinational helpers for stage 2
  logic [2:0]          sec_c;
  phase_e              pmax_c, pmid_c, pmin_c;
  fix_t                vmax_c, vmid_c, vmin_c;
  logic signed [17:0]  t1_c, t2_c, tz_c;

  function automatic fix_t pick(input abc_t v, input phase_e p);
    case (p)
      PH_A:    return v.a;
      PH_B:    return v.b;
      default: return v.c;
    endcase
  endfunction

  always_comb begin
    case (sgn_s1)
      3'b010:  begin sec_c = 3'd2; pmax_c = PH_B; pmid_c = PH_A; pmin_c = PH_C; end
      3'b011:  begin sec_c = 3'd3; pmax_c = PH_B; pmid_c = PH_C; pmin_c = PH_A; end
      3'b001:  begin sec_c = 3'd4; pmax_c = PH_C; pmid_c = PH_B; pmin_c = PH_A; end
      3'b101:  begin sec_c = 3'd5; pmax_c = PH_C; pmid_c = PH_A; pmin_c = PH_B; end
      3'b100:  begin sec_c = 3'd6; pmax_c = PH_A; pmid_c = PH_C; pmin_c = PH_B; end
      default: begin sec_c = 3'd1; pmax_c = PH_A; pmid_c = PH_B; pmin_c = PH_C; end
    endcase
    vmax_c = pick(v_s1, pmax_c);
    vmid_c = pick(v_s1, pmid_c);
    vmin_c = pick(v_s1, pmin_c);
    t1_c   = 18'(vmax_c) - 18'(vmid_c);
    t2_c   = 18'(vmid_c) - 18'(vmin_c);
    tz_c   = ONE - t1_c - t2_c;
  end

  // Stage 3 helpers
  logic signed [17:0] dmin_c, dmid_c, dmax_c;
  fix_t               qmin_c, qmid_c, qmax_c;

  function automatic fix_t clamp01(input logic signed [17:0] x);
    if (x < 0)        return '0;
    else if (x > ONE) return fix_t'(ONE);
    else              return fix_t'(x);
  endfunction

  always_comb begin
    dmin_c = t7_s2;
    dmid_c = t7_s2 + t2_s2;
    dmax_c = t7_s2 + t2_s2 + t1_s2;
    qmin_c = clamp01(dmin_c);
    qmid_c = clamp01(dmid_c);
    qmax_c = clamp01(dmax_c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      v2      <= 1'b0;
      valid   <= 1'b0;
      duty    <= '0;
      sector  <= 3'd1;
      overmod <= 1'b0;
    end else begin
      v1    <= valid_in;
      v2    <= v1;
      valid <= v2;
      // Stage 1: order the phases.
      v_s1   <= v_abc;
      sgn_s1 <= {v_abc.a >= v_abc.b, v_abc.b >= v_abc.c, v_abc.c >= v_abc.a};
      // Stage 2: sector, active and zero vector times.
      sec_s2  <= sec_c;
      pmax_s2 <= pmax_c;
      pmid_s2 <= pmid_c;
      pmin_s2 <= pmin_c;
      t1_s2   <= t1_c;
      t2_s2   <= t2_c;
      t7_s2   <= (tz_c < 0) ? '0 : (tz_c >>> 1);
      om_s2   <= (tz_c < 0);
      // Stage 3: on-times per phase.
      sector  <= sec_s2;
      overmod <= om_s2 || (dmax_c > ONE);
      duty.a  <= (pmax_s2 == PH_A) ? qmax_c : (pmid_s2 == PH_A) ? qmid_c : qmin_c;
      duty.b  <= (pmax_s2 == PH_B) ? qmax_c : (pmid_s2 == PH_B) ? qmid_c : qmin_c;
      duty.c  <= (pmax_s2 == PH_C) ? qmax_c : (pmid_s2 == PH_C) ? qmid_c : qmin_c;
    end
  end

  // The three phases always take the three distinct roles.
  always_ff @(posedge clk) begin
    if (rst_n && v2)
      assert (pmax_s2 != pmid_s2 && pmid_s2 != pmin_s2 && pmax_s2 != pmin_s2)
        else $error("svpwm: phase roles not distinct");
  end
endmodule
