// comp_sequencer - control flow of the improved two-switching-cycle compensation
//
// Runs the flowchart of the improved algorithm once per switching cycle, on
// each new set of samples (`smp_valid`):
//
//  IDLE   steady state under the PID controller. If the input voltage has
//         moved more than DETECT_V from the value the converter last settled
//         at (v_in base), a prediction is started (event `detect`);
//         otherwise the PID and the load estimator are stepped (`pid_step`).
//  CALC   waits for the predictor. d1 is sent out for the first switching
//         cycle; if it lies outside [0,100 %] it is clamped (event
//         `clamp_d1`) and a new prediction follows on the next samples
//         (RECALC), else the sequence goes on to STEP1.
//  STEP1  d1 is being applied. If the input voltage sampled now (point 2)
//         differs from the one at point 1 by more than VIN_TOL_V, the
//         compensation restarts from these samples (event `restart_vin`).
//         Otherwise d2 is sent out for the second cycle: clamped with a
//         restart (event `clamp_d2`) if outside [0,100 %], else -> STEP2.
//  STEP2  d2 is being applied. On the next samples the transient is over:
//         `pid_load` resets the PID outputs to i_Lnew and D_new, the input
//         voltage of point 1 becomes the new base (event `finish`) -> IDLE.
//
// The states, restart and clamping rules follow the reference flowchart.
// The detection threshold, the "input voltage still changing" tolerance,
// and taking the first sample after reset as the base are this design's
// choices.
//
// Timing: `pred_start`, `pid_step`, `pid_load` and the events are one-clock
// pulses on the clock after `smp_valid` (or after `pred_done`); `duty_comp`
// changes together with them and holds. `comp_active` is high while the
// compensation owns the duty (every state but IDLE).
module comp_sequencer
  import dcdc_pkg::*;
#(
  parameter real DETECT_V  = 0.25,       // large-signal input change [V]
  parameter real VIN_TOL_V = 1.0 / 32.0  // "still changing" tolerance [V]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         smp_valid,   // new samples this clock
  input  fix_t         vin,         // sampled input voltage [V]
  // duty predictor
  output logic         pred_start,
  input  logic         pred_done,
  input  fix_t         d1,
  input  fix_t         d2,
  // duty source and PID control
  output logic         comp_active,
  output fix_t         duty_comp,
  output logic         pid_step,
  output logic         pid_load,
  output comp_events_t ev
);

  localparam fix_t DETECT = to_fix(DETECT_V);
  localparam fix_t VTOL   = to_fix(VIN_TOL_V);

  typedef enum logic [2:0] {IDLE, CALC, STEP1, STEP2, RECALC} state_t;
  state_t state;

  fix_t vin_base, vin_p1, d2_q;
  logic base_ok;

  function automatic fix_t fabs(input fix_t v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic logic out_of_range(input fix_t d);
    return (d < 0) || (d > FIX_ONE);
  endfunction

  assign comp_active = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      vin_base   <= '0;
      vin_p1     <= '0;
      d2_q       <= '0;
      base_ok    <= 1'b0;
      duty_comp  <= '0;
      pred_start <= 1'b0;
      pid_step   <= 1'b0;
      pid_load   <= 1'b0;
      ev         <= '0;
    end else begin
      pred_start <= 1'b0;
      pid_step   <= 1'b0;
      pid_load   <= 1'b0;
      ev         <= '0;
      unique case (state)
        IDLE: if (smp_valid) begin
          if (!base_ok) begin
            base_ok  <= 1'b1;
            vin_base <= vin;
            pid_step <= 1'b1;
          end else if (fabs(vin - vin_base) > DETECT) begin
            ev.detect  <= 1'b1;
            pred_start <= 1'b1;
            vin_p1     <= vin;
            state      <= CALC;
          end else begin
            pid_step <= 1'b1;
          end
        end
        CALC: if (pred_done) begin
          d2_q      <= d2;
          duty_comp <= clamp01(d1);
          if (out_of_range(d1)) begin
            ev.clamp_d1 <= 1'b1;
            state       <= RECALC;
          end else begin
            state       <= STEP1;
          end
        end
        STEP1: if (smp_valid) begin
          if (fabs(vin - vin_p1) > VTOL) begin
            ev.restart_vin <= 1'b1;
            pred_start     <= 1'b1;
            vin_p1         <= vin;
            state          <= CALC;
          end else begin
            duty_comp <= clamp01(d2_q);
            if (out_of_range(d2_q)) begin
              ev.clamp_d2 <= 1'b1;
              state       <= RECALC;
            end else begin
              state       <= STEP2;
            end
          end
        end
        RECALC: if (smp_valid) begin
          pred_start <= 1'b1;
          vin_p1     <= vin;
          state      <= CALC;
        end
        STEP2: if (smp_valid) begin
          pid_load  <= 1'b1;
          ev.finish <= 1'b1;
          vin_base  <= vin_p1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
