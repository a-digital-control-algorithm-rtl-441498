// current_mode_pid_tb - checks the current-mode PID against a floating-point model
// Random samples are fed through the controller and through the same two
// loop equations evaluated here in floating point (voltage PID to current
// reference, current PI to duty, limits on outputs and integrators). The
// `load` input must set both outputs to the given values at once and the
// integrators so that a zero-error step leaves them unchanged.
`timescale 1ns/1ps
module current_mode_pid_tb;
  import dcdc_pkg::*;
  localparam real KPV = 8.0, KIV = 1.0, KDV = 8.0, KPI = 0.06, KII = 0.03;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic step = 1'b0, load = 1'b0;
  fix_t vo = '0, il_smp = '0, load_iref = '0, load_duty = '0, iref, duty;
  int checks = 0, failures = 0;

  current_mode_pid dut (.*);

  real m_iv = 0.0, m_ii = 0.0, m_evp = 0.0, m_iref = 0.0, m_d = 0.0;

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  function automatic real lim(real x, real lo, real hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction
  task automatic expect_near(real got, real want, real tol, string what);
    checks++;
    if (fabs(got - want) > tol) begin
      failures++;
      $display("FAIL: %s = %f, expected %f", what, got, want);
    end
  endtask

  task automatic do_step(real v, real i);
    real ev, ei;
    @(negedge clk);
    vo = to_fix(v); il_smp = to_fix(i); step = 1'b1;
    @(negedge clk); step = 1'b0;
    ev = 2.5 - fix_to_real(vo);
    m_iref = lim(m_iv + KPV * ev + KDV * (ev - m_evp), -15.0, 15.0);
    m_iv   = lim(m_iv + KIV * ev, -15.0, 15.0);
    m_evp  = ev;
    ei     = m_iref - fix_to_real(il_smp);
    m_d    = lim(m_ii + KPI * ei, 0.0, 1.0);
    m_ii   = lim(m_ii + KII * ei, 0.0, 1.0);
    expect_near(fix_to_real(iref), m_iref, 0.005, "iref");
    expect_near(fix_to_real(duty), m_d, 0.003, "duty");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++)
      do_step(2.3 + 0.4 * ($urandom % 1000) / 1000.0, 6.0 * ($urandom % 1000) / 1000.0);
    // saturation: long undervoltage drives i_ref and duty to their limits
    for (int n = 0; n < 60; n++) do_step(1.0, 0.0);
    expect_near(fix_to_real(iref), 15.0, 0.001, "iref limit");
    expect_near(fix_to_real(duty), 1.0, 0.001, "duty limit");
    // output reset by the compensation
    @(negedge clk);
    load_iref = to_fix(6.875); load_duty = to_fix(0.3467); load = 1'b1;
    @(negedge clk); load = 1'b0;
    expect_near(fix_to_real(iref), 6.875, 0.0001, "iref after load");
    expect_near(fix_to_real(duty), 0.3467, 0.0001, "duty after load");
    m_iv = 6.875; m_ii = 0.3467; m_evp = 0.0;
    do_step(2.5, 6.875);                   // zero errors: outputs stay
    expect_near(fix_to_real(duty), 0.3467, 0.0001, "duty held at zero error");
    for (int n = 0; n < 50; n++)
      do_step(2.45 + 0.1 * ($urandom % 1000) / 1000.0, 5.0 + 3.0 * ($urandom % 1000) / 1000.0);
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
