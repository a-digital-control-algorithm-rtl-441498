// adc_capture_tb - checks sampling and scaling of the three converter words
// Random codes (including the ends of each range and negative currents) are
// presented; only the words present at `strobe` may be taken, `valid` must
// follow one clock later, and the outputs must equal code x LSB
// (1/32 V, 1/16 A, 1/128 V), worked out here in floating point.
`timescale 1ns/1ps
module adc_capture_tb;
  import dcdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic strobe = 1'b0, valid;
  logic [8:0] adc_vin = '0, adc_vo = '0;
  logic signed [8:0] adc_il = '0;
  fix_t vin, il, vo;
  int checks = 0, failures = 0;

  adc_capture dut (.*);

  task automatic one(logic [8:0] cv, logic signed [8:0] ci, logic [8:0] co);
    @(negedge clk);
    adc_vin = cv; adc_il = ci; adc_vo = co; strobe = 1'b1;
    @(negedge clk);
    strobe = 1'b0;
    adc_vin = ~cv; adc_il = ~ci; adc_vo = ~co;      // must not be taken
    checks++;
    if (!valid || fix_to_real(vin) != $itor(cv) / 32.0 || fix_to_real(il) != $itor(ci) / 16.0 ||
        fix_to_real(vo) != $itor(co) / 128.0) begin
      failures++;
      $display("FAIL: codes %0d %0d %0d -> %f %f %f valid %0d", cv, ci, co,
               fix_to_real(vin), fix_to_real(il), fix_to_real(vo), valid);
    end
    @(negedge clk);
    checks++;
    if (valid || fix_to_real(vin) != $itor(cv) / 32.0) begin
      failures++;
      $display("FAIL: output not held / valid not a single pulse");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one(9'd160, 9'sd80, 9'd320);    // 5 V, 5 A, 2.5 V
    one(9'd511, -9'sd256, 9'd511);
    one(9'd0, 9'sd255, 9'd0);
    one(9'd240, -9'sd8, 9'd319);
    repeat (100) one(9'($urandom), 9'($urandom), 9'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
