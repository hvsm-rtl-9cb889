// sp_detector: condition detector of one streaming processor (SP).
//
// Every SP has one detector beside it, off the SP's critical path. The
// detector holds the SP's initial condition, measured after fabrication and
// written through the cfg port (initial threshold voltage Vth0 and effective
// channel length Leff), and two 64-bit timers that count, at cycle
// granularity, the cycles the SP spends under stress (it executes an
// operation) and in recovery (it is idle). From these it computes, every
// cycle and combinationally, the SP's present condition:
//
//   NBTI threshold shift (negative bias temperature instability):
//     dVth = (K*sqrt(ts) + dVth0^(1/2n))^(2n) * (1 - sqrt(eta*tr/(ts+tr)))
//     with n = 1/6, so the inner power is 3 and the outer one a cube root,
//     eta = 0.35, and dVth0 = Vth0 - VTH_NOM the variation left by
//     process variation;
//   switch delay (alpha-power law):
//     T ~ Vdd*Leff / (mu*(Vdd - Vth)^alpha), alpha = 1.3, Vth = VTH_NOM+dVth.
//
// cond_key is proportional to T (Vdd and the carrier mobility mu are taken
// as chip-wide constants and left out), so a smaller key is a better
// conditioned SP. The two models, n, eta, alpha and the two 64-bit timers
// follow the HVSM description. This design's own choices are: the
// fixed-point formats (see hvsm_pkg), K supplied as a Q16 input, the supply
// and nominal threshold voltages, 0.9 V and 0.3 V, the stress/recovery
// definition by SP activity, and (Vdd-Vth)^-alpha evaluated by linear
// interpolation in a 65-entry table with 25.6 mV steps, filled at
// elaboration from the exact power law.
//
// Timing: timers update on the clock edge; dvth and cond_key follow the
// timer and configuration registers with no further delay. tmr_we loads both
// timers (to restore saved ages or for test) and takes priority over
// counting.
module sp_detector
  import hvsm_pkg::*;
#(
  parameter int  VDD      = 9000,   // supply voltage, 0.1 mV units
  parameter int  VTH_NOM  = 3000,   // nominal threshold voltage, 0.1 mV units
  parameter int  ETA_Q16  = 22938,  // eta = 0.35 in Q16
  parameter real ALPHA    = 1.3     // alpha-power-law exponent
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // initial condition, written once after fabrication test
  input  logic                      cfg_we,
  input  logic signed [VOLT_W-1:0]  cfg_vth0,
  input  logic [LEFF_W-1:0]         cfg_leff,
  // timer preset
  input  logic                      tmr_we,
  input  logic [TIMER_W-1:0]        tmr_stress,
  input  logic [TIMER_W-1:0]        tmr_recov,
  // SP activity this cycle: 1 = stress, 0 = recovery
  input  logic                      active,
  // chip-wide NBTI factor K, Q16, in (0.1 mV)^3 per sqrt(cycle)
  input  logic [31:0]               k_q16,
  output logic [TIMER_W-1:0]        t_stress,
  output logic [TIMER_W-1:0]        t_recov,
  output logic signed [VOLT_W-1:0]  dvth,
  output logic [KEY_W-1:0]          cond_key
);

  localparam int LUT_N = 65;

  // 2^16 * (x / 1 V)^-alpha at x = i * 25.6 mV; entry 0 saturates.
  function automatic logic [23:0] lut_val(input int i);
    real xv, v;
    if (i == 0) return 24'hFF_FFFF;
    xv = real'(i) * 0.0256;
    v  = 65536.0 * (xv ** (-ALPHA));
    if (v > 16777215.0) return 24'hFF_FFFF;
    return 24'($rtoi(v + 0.5));
  endfunction

  logic [23:0] lut [LUT_N];
  for (genvar gi = 0; gi < LUT_N; gi++) begin : g_lut
    localparam logic [23:0] LV = lut_val(gi);
    assign lut[gi] = LV;
  end

  logic signed [VOLT_W-1:0] vth0_q;
  logic [LEFF_W-1:0]        leff_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vth0_q   <= VOLT_W'(VTH_NOM);
      leff_q   <= '0;
      t_stress <= '0;
      t_recov  <= '0;
    end else begin
      if (cfg_we) begin
        vth0_q <= cfg_vth0;
        leff_q <= cfg_leff;
      end
      if (tmr_we) begin
        t_stress <= tmr_stress;
        t_recov  <= tmr_recov;
      end else if (active) begin
        t_stress <= t_stress + 1'b1;
      end else begin
        t_recov  <= t_recov + 1'b1;
      end
    end
  end

  // ---------------- NBTI model ----------------
  logic [31:0]        sq_ts;
  logic [63:0]        kterm_full;
  logic signed [47:0] kterm;
  logic signed [17:0] d0_raw;
  logic signed [15:0] d0;
  logic signed [47:0] d0_cube;
  logic signed [48:0] inner_sum;
  logic signed [47:0] inner;
  logic signed [17:0] croot;

  logic [64:0]        total;
  logic [6:0]         shamt;
  logic [15:0]        den;
  logic [15:0]        num;
  logic [16:0]        ratio_q16;
  logic [63:0]        eta_ratio;
  logic [31:0]        sq_rec;
  logic [16:0]        rec_q16;
  logic signed [35:0] dvth_full;

  always_comb begin
    sq_ts      = isqrt64(t_stress);
    kterm_full = (64'(sq_ts) * 64'(k_q16)) >> 16;
    kterm      = (kterm_full > 64'h0000_3FFF_FFFF_FFFF) ? 48'sh3FFF_FFFF_FFFF
                                                         : 48'(kterm_full);
    d0_raw = 18'(vth0_q) - 18'(VTH_NOM);
    if (d0_raw > 18'sd16383)       d0 = 16'sd16383;
    else if (d0_raw < -18'sd16383) d0 = -16'sd16383;
    else                           d0 = 16'(d0_raw);
    d0_cube   = 48'(d0) * 48'(d0) * 48'(d0);
    inner_sum = 49'(kterm) + 49'(d0_cube);
    if (inner_sum > 49'sh0_7FFF_FFFF_FFFF)       inner = 48'sh7FFF_FFFF_FFFF;
    else if (inner_sum < -49'sh0_7FFF_FFFF_FFFF) inner = -48'sh7FFF_FFFF_FFFF;
    else                                          inner = 48'(inner_sum);
    croot = icbrt48(inner);

    // recovery factor 1 - sqrt(eta * tr / (ts + tr)), both timers scaled to
    // 16 significant bits before the division
    total = 65'(t_stress) + 65'(t_recov);
    shamt = '0;
    for (int b = 16; b <= 64; b++) begin
      if (total[b]) shamt = 7'(b - 15);
    end
    den = 16'(total >> shamt);
    num = 16'((65'(t_recov)) >> shamt);
    if (den == '0) ratio_q16 = '0;
    else           ratio_q16 = 17'((33'(num) << 16) / 33'(den));
    eta_ratio = 64'(ratio_q16) * 64'(ETA_Q16);
    sq_rec    = isqrt64(eta_ratio);
    rec_q16   = 17'(32'd65536 - sq_rec);
    dvth_full = (36'(croot) * $signed({19'b0, rec_q16})) >>> 16;
    if (dvth_full > 36'sd32767)       dvth = 16'sd32767;
    else if (dvth_full < -36'sd32768) dvth = -16'sd32768;
    else                              dvth = 16'(dvth_full);
  end

  // ---------------- delay model ----------------
  logic signed [17:0] vth_now;
  logic signed [17:0] xdiff;
  logic [13:0]        x;
  logic [5:0]         idx;
  logic [7:0]         fr;
  logic [23:0]        lo, hi;
  logic [31:0]        step_full;
  logic [23:0]        step;
  logic [23:0]        finv;

  always_comb begin
    vth_now = 18'(VTH_NOM) + 18'(dvth);
    xdiff   = 18'(VDD) - vth_now;
    if (xdiff < 18'sd1)          x = 14'd1;
    else if (xdiff > 18'sd16383) x = 14'd16383;
    else                         x = 14'(xdiff);
    idx  = x[13:8];
    fr   = x[7:0];
    lo   = lut[7'(idx)];
    hi   = lut[7'(idx) + 7'd1];
    step_full = 32'(lo - hi) * 32'(fr);
    step      = step_full[31:8];
    finv = lo - 24'(step);
    cond_key = KEY_W'(leff_q) * KEY_W'(finv);
  end

endmodule
