// dither_tb - checks the 10-bit to 8-bit dither
// For every 10-bit duty, four consecutive switching cycles must give 8-bit
// words that differ from d10/4 by at most one and sum to exactly d10
// (or to 4 x 255 when the word saturates); an LSB pair of 2 must alternate.
`timescale 1ns/1ps
module dither_tb;
  import dcdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cycle_tick = 1'b0;
  logic [9:0] d10 = '0;
  logic [7:0] d8;
  int checks = 0, failures = 0;

  dither dut (.*);

  initial begin
    int sum, want;
    logic [7:0] w [4];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 1024; d++) begin
      d10 = 10'(d);
      sum = 0;
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        w[c] = d8;
        sum += int'(d8);
        checks++;
        if (int'(d8) < d / 4 || int'(d8) > d / 4 + 1) begin
          failures++;
          $display("FAIL: d10 %0d gives d8 %0d", d, d8);
        end
        cycle_tick = 1'b1;
        @(negedge clk);
        cycle_tick = 1'b0;
      end
      want = (d >= 1020) ? 1020 : d;    // 255 is the largest word
      checks++;
      if (sum != want) begin
        failures++;
        $display("FAIL: d10 %0d: four words sum to %0d", d, sum);
      end
      if (d % 4 == 2 && d < 1020) begin
        checks++;
        if (!((w[0] != w[1]) && (w[1] != w[2]) && (w[2] != w[3]))) begin
          failures++;
          $display("FAIL: d10 %0d: LSB pair 2 not alternating", d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
