// adc_capture - sample register and scaling for the three 9-bit A/D converters
//
// On `strobe` (issued by the DPWM 0.3 Ts before the switch turns on) the
// three 9-bit converter words are registered and converted to fix_t volts
// and amps by multiplying with the LSB weight of each channel. v_in and v_o
// are straight binary, i_L is two's complement so the converter can report
// the negative inductor current of a synchronous buck at light load.
// `valid` pulses one clock after `strobe`, with the values held until the
// next strobe. The 9-bit width is the reference design's; the LSB weights,
// the coding and the converter timing (data valid at the strobe) are this
// design's choices. With power-of-two LSB weights the low fraction bits of
// the outputs are constant zero; they are kept so every quantity shares fix_t.
module adc_capture
  import dcdc_pkg::*;
#(
  parameter real VIN_LSB_V = dcdc_pkg::DEF_VIN_LSB_V,
  parameter real VO_LSB_V  = dcdc_pkg::DEF_VO_LSB_V,
  parameter real IL_LSB_A  = dcdc_pkg::DEF_IL_LSB_A
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    strobe,
  input  logic        [ADC_W-1:0] adc_vin,
  input  logic signed [ADC_W-1:0] adc_il,
  input  logic        [ADC_W-1:0] adc_vo,
  output logic                    valid,
  output fix_t                    vin,
  output fix_t                    il,
  output fix_t                    vo
);

  localparam fix_t VIN_LSB = to_fix(VIN_LSB_V);
  localparam fix_t VO_LSB  = to_fix(VO_LSB_V);
  localparam fix_t IL_LSB  = to_fix(IL_LSB_A);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      vin   <= '0;
      il    <= '0;
      vo    <= '0;
    end else begin
      valid <= strobe;
      if (strobe) begin
        vin <= fix_t'($unsigned(adc_vin)) * VIN_LSB;
        il  <= fix_t'(adc_il) * IL_LSB;
        vo  <= fix_t'($unsigned(adc_vo)) * VO_LSB;
      end
    end
  end

endmodule
