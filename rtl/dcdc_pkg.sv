// dcdc_pkg - shared fixed-point number format, converter constants and helpers
//
// Every physical quantity inside the controller (volts, amps, duty ratio,
// dimensionless ratios) is carried as a signed Q15.16 fixed-point word
// (fix_t): 32 bits, 16 of them fractional, so 1.0 V = 1.0 A = 100 % duty =
// 65536. The range of +/-32768 covers every intermediate value of the duty
// prediction for the converter described here (volts below 20, amps below 40,
// C/Ts about 94).
//
// The converter values (L = 1 uH, C = 235 uF, fs = 400 kHz, Vo = 2.5 V,
// 100 MHz controller clock) and the 0.3 Ts sampling advance follow the
// reference design. The output capacitor ESR, the loss resistance r_loss and
// the ADC scale factors are not given for it and are choices of this design.
package dcdc_pkg;

  localparam int FRAC = 16;
  typedef logic signed [31:0] fix_t;

  localparam fix_t FIX_ONE  = fix_t'(32'sd1 <<< FRAC);
  localparam fix_t FIX_HALF = fix_t'(32'sd1 <<< (FRAC - 1));

  // ---- width of the data paths of the reference design ----
  localparam int ADC_W  = 9;   // each A/D converter delivers 9 bits
  localparam int DUTY_W = 10;  // controller output d_10bit(k+1)
  localparam int DPWM_W = 8;   // DPWM input d_8bit(k+1)

  // ---- converter and controller defaults ----
  localparam real DEF_L_H        = 1.0e-6;   // output inductor
  localparam real DEF_C_F        = 235.0e-6; // output capacitor
  localparam real DEF_FS_HZ      = 400.0e3;  // switching frequency
  localparam real DEF_FCLK_HZ    = 100.0e6;  // controller clock
  localparam real DEF_VREF_V     = 2.5;      // nominal output voltage
  localparam real DEF_ESR_OHM    = 0.003;    // assumed, not given for the design
  localparam real DEF_RLOSS_OHM  = 0.010;    // assumed R_L + R_on + R_switching
  localparam real DEF_SAMPLE_ADV = 0.3;      // samples taken 0.3 Ts before turn-on

  // ADC scale (one LSB), chosen for 9-bit converters
  localparam real DEF_VIN_LSB_V = 1.0 / 32.0;  // 0 .. 15.97 V
  localparam real DEF_VO_LSB_V  = 1.0 / 128.0; // 0 .. 3.99 V
  localparam real DEF_IL_LSB_A  = 1.0 / 16.0;  // two's complement, -16 .. +15.94 A

  // real -> fix_t, rounded to nearest; for constant expressions only
  function automatic fix_t to_fix(input real r);
    return fix_t'($rtoi(r * 65536.0 + ((r >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // fix_t -> real, for testbenches and reports
  function automatic real fix_to_real(input fix_t f);
    return $itor(f) / 65536.0;
  endfunction

  // Q16 x Q16 -> Q16, truncating towards minus infinity
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fix_t'(p >>> FRAC);
  endfunction

  // clamp into [0, 1]
  function automatic fix_t clamp01(input fix_t d);
    if (d < 0)       return '0;
    if (d > FIX_ONE) return FIX_ONE;
    return d;
  endfunction

  // Events raised by the compensation sequencer, one pulse each
  typedef struct packed {
    logic detect;      // large-signal input-voltage change recognised
    logic restart_vin; // input still changing at point 2: restart
    logic clamp_d1;    // d1 outside [0,100 %]: clamped, restart
    logic clamp_d2;    // d2 outside [0,100 %]: clamped, restart
    logic finish;      // transient over: PID outputs reset to i_Lnew, D_new
  } comp_events_t;

endpackage
