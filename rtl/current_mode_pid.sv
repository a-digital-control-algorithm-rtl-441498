// current_mode_pid - steady-state current-mode PID controller with output reset
//
// Two nested loops, evaluated once per switching cycle on `step`:
//   voltage loop (PID): e_v = Vref - v_o
//       i_ref = I_v + KP_V e_v + KD_V (e_v - e_v_prev),   I_v += KI_V e_v
//   current loop (PI):  e_i = i_ref - i_L(sample)
//       d     = I_i + KP_I e_i,                           I_i += KI_I e_i
// i_ref is limited to +/-IREF_MAX and d to [0, DMAX]; the integrators are
// limited the same way so they do not wind up.
//
// When the two-cycle compensation ends, `load` sets both loop outputs (and
// their integrators) to the values the compensation computed: i_ref = i_Lnew
// and d = D_new, so the converter continues in its new steady state without a
// switchover transient. That reset is the reference design's; the loop
// structure and all gains are this design's choice (the reference design
// only names a current mode PID controller tuned for bandwidth at 50 degrees
// phase margin), picked for a stable loop with the default converter.
//
// Timing: `duty`/`iref` are registered and change on the clock after
// `step` or `load`; `load` wins over `step`.
module current_mode_pid
  import dcdc_pkg::*;
#(
  parameter real VREF_V   = dcdc_pkg::DEF_VREF_V,
  parameter real KP_V     = 8.0,    // A/V
  parameter real KI_V     = 1.0,    // A/V per cycle
  parameter real KD_V     = 8.0,    // A/V
  parameter real KP_I     = 0.06,   // 1/A
  parameter real KI_I     = 0.03,   // 1/A per cycle
  parameter real IREF_MAX = 15.0,   // A
  parameter real DMAX     = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,      // run one controller update
  input  fix_t vo,        // output voltage sample [V]
  input  fix_t il_smp,    // inductor current sample [A]
  input  logic load,      // reset the outputs to the values below
  input  fix_t load_iref, // i_Lnew [A]
  input  fix_t load_duty, // D_new
  output fix_t iref,      // current reference [A]
  output fix_t duty       // duty cycle
);

  localparam fix_t VREF  = to_fix(VREF_V);
  localparam fix_t F_KPV = to_fix(KP_V);
  localparam fix_t F_KIV = to_fix(KI_V);
  localparam fix_t F_KDV = to_fix(KD_V);
  localparam fix_t F_KPI = to_fix(KP_I);
  localparam fix_t F_KII = to_fix(KI_I);
  localparam fix_t IMAX  = to_fix(IREF_MAX);
  localparam fix_t DMX   = to_fix(DMAX);

  function automatic fix_t lim(input fix_t v, input fix_t lo, input fix_t hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  fix_t iv_q, ii_q, ev_prev;
  fix_t ev, iref_n, iv_n, ei, duty_n, ii_n;

  always_comb begin
    ev     = VREF - vo;
    iref_n = lim(iv_q + fmul(F_KPV, ev) + fmul(F_KDV, ev - ev_prev), -IMAX, IMAX);
    iv_n   = lim(iv_q + fmul(F_KIV, ev), -IMAX, IMAX);
    ei     = iref_n - il_smp;
    duty_n = lim(ii_q + fmul(F_KPI, ei), '0, DMX);
    ii_n   = lim(ii_q + fmul(F_KII, ei), '0, DMX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv_q    <= '0;
      ii_q    <= '0;
      ev_prev <= '0;
      iref    <= '0;
      duty    <= '0;
    end else if (load) begin
      iv_q    <= load_iref;
      ii_q    <= load_duty;
      ev_prev <= '0;
      iref    <= load_iref;
      duty    <= load_duty;
    end else if (step) begin
      iv_q    <= iv_n;
      ii_q    <= ii_n;
      ev_prev <= ev;
      iref    <= iref_n;
      duty    <= duty_n;
    end
  end

endmodule
