// dcdc_controller_top - digital controller of a synchronous buck converter with
// two-switching-cycle compensation of input-voltage changes
//
// The digital part of the converter: three 9-bit A/D converters (v_in, i_L,
// v_o) are sampled once per switching cycle, 0.3 Ts before the high-side
// switch turns on; the optimal controller turns the samples into a 10-bit
// duty for the next cycle (PID in steady state, predicted d1/d2 after an
// input-voltage step); the dither stage reduces it to 8 bits over four
// cycles; the DPWM drives the gate-driver inputs of S1 and S2.
//
//   adc_* --> adc_capture --> optimal_controller --d10--> dither --d8--> dpwm --> gate_s1/s2
//                 ^                                          ^            |
//                 +------------- adc_sample -----------------+-- tick ----+
//
// This chain follows the block diagram of the reference FPGA implementation
// (100 MHz clock, 400 kHz switching, 9-bit converters, 10-bit controller
// output, 8-bit DPWM). The A/D converters, the gate driver and the power stage
// are outside: their signals are the ports below.
//
// Timing: one switching cycle is PERIOD = 250 clocks. `adc_sample` is high
// for one clock at count 175; the ADC words must be valid in that clock.
// The duty computed from those samples is applied from the next turn-on.
module dcdc_controller_top
  import dcdc_pkg::*;
#(
  parameter real L_H        = dcdc_pkg::DEF_L_H,
  parameter real C_F        = dcdc_pkg::DEF_C_F,
  parameter real FS_HZ      = dcdc_pkg::DEF_FS_HZ,
  parameter real FCLK_HZ    = dcdc_pkg::DEF_FCLK_HZ,
  parameter real VREF_V     = dcdc_pkg::DEF_VREF_V,
  parameter real ESR_OHM    = dcdc_pkg::DEF_ESR_OHM,
  parameter real RLOSS_OHM  = dcdc_pkg::DEF_RLOSS_OHM,
  parameter real SAMPLE_ADV = dcdc_pkg::DEF_SAMPLE_ADV,
  parameter int unsigned DEADTIME = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // A/D converters
  input  logic        [ADC_W-1:0] adc_vin,
  input  logic signed [ADC_W-1:0] adc_il,
  input  logic        [ADC_W-1:0] adc_vo,
  output logic                    adc_sample,
  // gate driver
  output logic                    gate_s1,
  output logic                    gate_s2,
  // status
  output logic [DUTY_W-1:0]       d10,
  output logic [DPWM_W-1:0]       d8,
  output logic                    comp_active,
  output comp_events_t            events
);

  localparam int unsigned PERIOD   = int'(FCLK_HZ / FS_HZ);
  localparam int unsigned ADV_CLKS = int'(SAMPLE_ADV * real'(PERIOD));

  logic smp_valid, cycle_tick;
  fix_t vin, il, vo, duty;

  adc_capture u_adc (
    .clk, .rst_n,
    .strobe (adc_sample),
    .adc_vin, .adc_il, .adc_vo,
    .valid  (smp_valid),
    .vin, .il, .vo
  );

  optimal_controller #(
    .L_H(L_H), .C_F(C_F), .FS_HZ(FS_HZ), .VREF_V(VREF_V),
    .ESR_OHM(ESR_OHM), .RLOSS_OHM(RLOSS_OHM), .SAMPLE_ADV(SAMPLE_ADV)
  ) u_ctrl (
    .clk, .rst_n,
    .smp_valid,
    .vin,
    .il_smp (il),
    .vo,
    .d10,
    .duty,
    .comp_active,
    .ev     (events)
  );

  dither u_dither (
    .clk, .rst_n,
    .cycle_tick,
    .d10,
    .d8
  );

  dpwm #(.PERIOD(PERIOD), .SAMPLE_ADV_CLKS(ADV_CLKS), .DEADTIME(DEADTIME)) u_dpwm (
    .clk, .rst_n,
    .d8,
    .gate_s1,
    .gate_s2,
    .cycle_tick,
    .smp_strobe (adc_sample)
  );

endmodule
