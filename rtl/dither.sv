// dither - 10-bit duty to 8-bit DPWM word by dithering the two LSBs
//
// The controller computes a 10-bit duty, the DPWM resolves 8 bits. The two
// extra bits are recovered on average over four switching cycles: the 8-bit
// word is d10[9:2], plus one in d10[1:0] of every four cycles. A 2-bit phase
// counter advances on every `cycle_tick` and is compared with the spread
// pattern 0,2,1,3, so an LSB pair of 2 alternates +1/+0 instead of bunching.
// The sum saturates at 255. Dithering 10 to 8 bits is the reference design's;
// the pattern and the four-cycle period are this design's choices.
//
// Timing: `d8` is combinational from `d10` and the phase register; the phase
// advances on the clock edge where `cycle_tick` is high, i.e. right after the
// DPWM has taken the current word.
module dither
  import dcdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cycle_tick,
  input  logic [DUTY_W-1:0] d10,
  output logic [DPWM_W-1:0] d8
);

  logic [1:0] phase;
  logic [1:0] thresh;
  logic [DPWM_W:0] sum;

  always_comb begin
    unique case (phase)
      2'd0: thresh = 2'd0;
      2'd1: thresh = 2'd2;
      2'd2: thresh = 2'd1;
      default: thresh = 2'd3;
    endcase
    sum = {1'b0, d10[DUTY_W-1:2]} + (DPWM_W+1)'(d10[1:0] > thresh);
    d8  = sum[DPWM_W] ? '1 : sum[DPWM_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          phase <= '0;
    else if (cycle_tick) phase <= phase + 2'd1;
  end

endmodule
