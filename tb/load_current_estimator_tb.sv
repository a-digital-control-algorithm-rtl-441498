// load_current_estimator_tb - checks the load-current estimate
// Samples are generated from an ideal steady-state buck waveform (valley
// current, falling slope Vref/L, sample 0.3 Ts before turn-on) for several
// loads and duties; the estimate must equal the true average current after
// the first update (direct load) and must follow a load change through the
// 1/8 first-order filter step by step. Without updates it must hold.
`timescale 1ns/1ps
module load_current_estimator_tb;
  import dcdc_pkg::*;
  localparam real TSL = 2.5, VREF = 2.5;   // Ts/L [A/V], nominal output
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic update = 1'b0;
  fix_t il_smp = '0, duty = '0, io;
  int checks = 0, failures = 0;

  load_current_estimator dut (.*);

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  task automatic expect_near(real got, real want, real tol, string what);
    checks++;
    if (fabs(got - want) > tol) begin
      failures++;
      $display("FAIL: %s = %f, expected %f", what, got, want);
    end
  endtask

  // sample of a steady waveform with average iavg and duty d
  function automatic real sample_of(real iavg, real d);
    real valley;
    valley = iavg - 0.5 * VREF * (1.0 - d) * TSL;
    return valley + 0.3 * VREF * TSL;
  endfunction

  task automatic step(real iavg, real d);
    @(negedge clk);
    il_smp = to_fix(sample_of(iavg, d)); duty = to_fix(d); update = 1'b1;
    @(negedge clk); update = 1'b0;
  endtask

  initial begin
    real est;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    step(5.0, 0.5);
    expect_near(fix_to_real(io), 5.0, 0.002, "first estimate");
    step(5.0, 0.5); step(5.0, 0.5);
    expect_near(fix_to_real(io), 5.0, 0.002, "steady estimate");
    // load step 5 A -> 1 A at a different duty: first-order approach
    est = 5.0;
    for (int n = 0; n < 60; n++) begin
      step(1.0, 0.35);
      est = est + (1.0 - est) / 8.0;
      expect_near(fix_to_real(io), est, 0.003, $sformatf("filtered estimate step %0d", n));
    end
    expect_near(fix_to_real(io), 1.0, 0.01, "settled estimate");
    // no update: hold
    @(negedge clk); il_smp = to_fix(9.0);
    repeat (20) @(negedge clk);
    expect_near(fix_to_real(io), est, 0.003, "held without update");
    // negative average current (light load, synchronous rectification)
    for (int n = 0; n < 80; n++) step(-0.5, 0.4);
    expect_near(fix_to_real(io), -0.5, 0.01, "negative load current");
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
