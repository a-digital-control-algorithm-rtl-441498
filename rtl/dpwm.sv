// dpwm - counter-based digital PWM for the two switches of a synchronous buck
//
// A counter runs from 0 to PERIOD-1 on the controller clock, PERIOD =
// f_clk/f_s = 250 for a 100 MHz clock and 400 kHz switching. At the last
// count the 8-bit duty word is taken (`cycle_tick` pulses) and turned into an
// on-time of floor(d8 * PERIOD / 256) clocks for the next cycle, which begins
// with the high-side switch S1 turning on at count 0. The low-side switch S2
// is the complement, with DEADTIME clocks of both-off on each edge. The ADC
// sample strobe fires SAMPLE_ADV_CLKS before the next turn-on (0.3 Ts = 75
// clocks), which leaves the controller that long to compute the next duty.
//
// The sampling instant (0.3 Ts before turn-on), the 8-bit input, the clock and
// the switching frequency are the reference design's. The counter structure,
// the dead time and the on-time scaling are this design's choices; the
// reference design only names the DPWM. The gate outputs are registered, so
// they follow the counter by one clock.
module dpwm
  import dcdc_pkg::*;
#(
  parameter int unsigned PERIOD          = 250,
  parameter int unsigned SAMPLE_ADV_CLKS = 75,
  parameter int unsigned DEADTIME        = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DPWM_W-1:0] d8,
  output logic              gate_s1,     // high-side switch on
  output logic              gate_s2,     // low-side switch on
  output logic              cycle_tick,  // last clock of a switching cycle
  output logic              smp_strobe   // take the ADC samples now
);

  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic [CW:0]   on_clks;
  logic [CW+DPWM_W-1:0] prod;

  assign cycle_tick = (cnt == CW'(PERIOD - 1));
  assign smp_strobe = (cnt == CW'(PERIOD - SAMPLE_ADV_CLKS));
  assign prod       = (CW+DPWM_W)'(d8) * (CW+DPWM_W)'(PERIOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      on_clks <= '0;
      gate_s1 <= 1'b0;
      gate_s2 <= 1'b0;
    end else begin
      if (cycle_tick) begin
        cnt     <= '0;
        on_clks <= (CW+1)'(prod >> DPWM_W);
      end else begin
        cnt <= cnt + 1'b1;
      end
      gate_s1 <= ({1'b0, cnt} < on_clks);
      gate_s2 <= ({1'b0, cnt} >= on_clks + (CW+1)'(DEADTIME)) &&
                 (32'(cnt) < PERIOD - DEADTIME);
    end
  end

endmodule
