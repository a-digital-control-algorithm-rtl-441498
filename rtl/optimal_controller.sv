// optimal_controller - input-voltage compensation plus steady-state PID, 10-bit duty out
//
// The "optimal control algorithm" block of the controller. Each switching
// cycle it receives one set of samples (v_in, i_L, v_o) and produces the
// duty d_10bit(k+1) for the next cycle:
//   - in steady state the current mode PID sets the duty, and the load
//     current estimator tracks i_o;
//   - when the sequencer sees a large input-voltage change, the duty
//     predictor computes d1/d2 from capacitor charge balance, the sequencer
//     applies them over two cycles (restarting while v_in still moves, or when
//     a duty had to be clamped), and finally resets the PID outputs to the
//     predicted steady-state i_Lnew and D_new.
//
// The 10-bit output is the fix_t duty rounded to 1/1024 and limited to
// 0..1023 (99.9 %); this quantisation is this design's choice for the 10-bit
// word of the reference design.
//
// Timing: PID updates land 2 clocks after `smp_valid`, compensation duties
// at most 69 clocks after it; both well before the next turn-on, which is
// 0.3 Ts (75 clocks at the defaults) after the samples.
module optimal_controller
  import dcdc_pkg::*;
#(
  parameter real L_H        = dcdc_pkg::DEF_L_H,
  parameter real C_F        = dcdc_pkg::DEF_C_F,
  parameter real FS_HZ      = dcdc_pkg::DEF_FS_HZ,
  parameter real VREF_V     = dcdc_pkg::DEF_VREF_V,
  parameter real ESR_OHM    = dcdc_pkg::DEF_ESR_OHM,
  parameter real RLOSS_OHM  = dcdc_pkg::DEF_RLOSS_OHM,
  parameter real SAMPLE_ADV = dcdc_pkg::DEF_SAMPLE_ADV,
  parameter real DETECT_V   = 0.25,
  parameter real VIN_TOL_V  = 1.0 / 32.0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      smp_valid,
  input  fix_t                      vin,
  input  fix_t                      il_smp,
  input  fix_t                      vo,
  output logic [DUTY_W-1:0]         d10,
  output fix_t                      duty,
  output logic                      comp_active,
  output comp_events_t              ev
);

  logic pred_start, pred_busy, pred_done, pred_nosol;
  fix_t d1, d2, d_new, il_new, io_est;
  logic pid_step, pid_load;
  fix_t duty_comp, pid_duty, pid_iref;

  comp_sequencer #(.DETECT_V(DETECT_V), .VIN_TOL_V(VIN_TOL_V)) u_seq (
    .clk, .rst_n,
    .smp_valid,
    .vin,
    .pred_start,
    .pred_done,
    .d1, .d2,
    .comp_active,
    .duty_comp,
    .pid_step,
    .pid_load,
    .ev
  );

  duty_predictor #(
    .L_H(L_H), .C_F(C_F), .FS_HZ(FS_HZ), .VREF_V(VREF_V),
    .ESR_OHM(ESR_OHM), .RLOSS_OHM(RLOSS_OHM), .SAMPLE_ADV(SAMPLE_ADV)
  ) u_pred (
    .clk, .rst_n,
    .start       (pred_start),
    .vin1        (vin),
    .il_smp      (il_smp),
    .vo1         (vo),
    .io          (io_est),
    .d_prev      (duty),
    .busy        (pred_busy),
    .done        (pred_done),
    .d1, .d2, .d_new, .il_new,
    .no_solution (pred_nosol)
  );

  load_current_estimator #(
    .L_H(L_H), .FS_HZ(FS_HZ), .VREF_V(VREF_V), .SAMPLE_ADV(SAMPLE_ADV)
  ) u_io (
    .clk, .rst_n,
    .update (pid_step),
    .il_smp,
    .duty,
    .io     (io_est)
  );

  current_mode_pid #(.VREF_V(VREF_V)) u_pid (
    .clk, .rst_n,
    .step      (pid_step),
    .vo,
    .il_smp,
    .load      (pid_load),
    .load_iref (il_new),
    .load_duty (d_new),
    .iref      (pid_iref),
    .duty      (pid_duty)
  );

  assign duty = comp_active ? duty_comp : pid_duty;

  // Q16 duty -> 10-bit code, rounded, limited to 0..1023
  localparam int SH = FRAC - DUTY_W;
  fix_t d_round;
  assign d_round = (duty + fix_t'(1 <<< (SH - 1))) >>> SH;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              d10 <= '0;
    else if (d_round < 0)    d10 <= '0;
    else if (d_round > 1023) d10 <= '1;
    else                     d10 <= d_round[DUTY_W-1:0];
  end

endmodule
