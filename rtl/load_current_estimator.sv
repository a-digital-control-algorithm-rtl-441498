// load_current_estimator - load current i_o from the inductor current before a transient
//
// The duty prediction treats the load current as constant through the
// transient and takes it from the average inductor current before it. The
// inductor current is only sampled once per switching cycle, SAMPLE_ADV*Ts
// before the switch turns on, i.e. on the falling slope -Vref/L. From one
// sample and the duty d applied in that cycle the cycle average is
//
//   i_avg = sample - SAMPLE_ADV Vref Ts/L + 1/2 Vref (1-d) Ts/L
//         = sample + (Ts/L) Vref (1/2 - SAMPLE_ADV) - (Ts/(2L)) Vref d
//
// and this is smoothed by a first-order filter io += (i_avg - io) / 2^SHIFT.
// The first update after reset loads i_avg directly. Updates are only given
// in steady state (PID mode), so the estimate is frozen during compensation.
// Taking the average from one sample per cycle and the filter are this
// design's choices; the reference design only says that i_o is the average
// inductor current before the transient.
//
// Timing: `io` changes on the clock after `update`.
module load_current_estimator
  import dcdc_pkg::*;
#(
  parameter real L_H        = dcdc_pkg::DEF_L_H,
  parameter real FS_HZ      = dcdc_pkg::DEF_FS_HZ,
  parameter real VREF_V     = dcdc_pkg::DEF_VREF_V,
  parameter real SAMPLE_ADV = dcdc_pkg::DEF_SAMPLE_ADV,
  parameter int unsigned SHIFT = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic update,  // one pulse per steady-state switching cycle
  input  fix_t il_smp,  // inductor current sample [A]
  input  fix_t duty,    // duty applied in the sampled cycle
  output fix_t io       // load current estimate [A]
);

  localparam real  TSL = 1.0 / (FS_HZ * L_H);
  localparam fix_t K_OFS  = to_fix(TSL * VREF_V * (0.5 - SAMPLE_ADV));
  localparam fix_t K_DUTY = to_fix(0.5 * TSL * VREF_V);

  fix_t i_avg;
  logic primed;
  assign i_avg = il_smp + K_OFS - fmul(K_DUTY, duty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io     <= '0;
      primed <= 1'b0;
    end else if (update) begin
      primed <= 1'b1;
      io     <= primed ? io + ((i_avg - io) >>> SHIFT) : i_avg;
    end
  end

endmodule
