// optimal_controller_tb - checks the controller between samples and 10-bit duty
// Samples are presented once per switching cycle (250 clocks). First a
// converter in steady state at 5 V / 5 A (samples consistent with the duty
// the controller outputs) lets the PID and the load estimate settle; the
// 10-bit output must always be the rounded duty. Then the input steps to
// 7.5 V and the samples of point 1 are computed from an ideal buck. The test
// checks, each within 0.3 Ts = 75 clocks of the samples: d1 in the first
// cycle and d2 in the second (against floating-point charge-balance
// formulas), then D_new with the PID taking over, and that the PID holds
// D_new when the samples show the new steady state.
`timescale 1ns/1ps
module optimal_controller_tb;
  import dcdc_pkg::*;
  localparam real L = 1.0e-6, C = 235.0e-6, TS = 2.5e-6, VREF = 2.5;
  localparam real ESR = 0.003, RLOSS = 0.010, ADV = 0.3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic smp_valid = 1'b0, comp_active;
  fix_t vin = '0, il_smp = '0, vo = '0, duty;
  logic [9:0] d10;
  comp_events_t ev;
  int checks = 0, failures = 0;
  int n_det = 0, n_fin = 0;

  optimal_controller dut (.*);

  always @(posedge clk) begin
    if (ev.detect) n_det++;
    if (ev.finish) n_fin++;
  end

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  function automatic int code_of(real d);
    int c;
    c = $rtoi(d * 1024.0 + 0.5);
    return (c < 0) ? 0 : (c > 1023) ? 1023 : c;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // present one set of samples, wait 75 clocks (sampling to turn-on)
  task automatic cycle(real v, real i, real o);
    @(negedge clk);
    vin = to_fix(v); il_smp = to_fix(i); vo = to_fix(o); smp_valid = 1'b1;
    @(negedge clk); smp_valid = 1'b0;
    repeat (73) @(negedge clk);
    check(int'(d10) == code_of(fix_to_real(duty)), $sformatf("d10 %0d for duty %f", d10, fix_to_real(duty)));
    repeat (175) @(negedge clk);
  endtask

  initial begin
    real vop, d0, ival, ip, ie, i1, vc, vo1, ils, ile, k, q0, x, rd1, rd2, dn, il1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // steady state at 5 V / 5 A: the sample follows the duty being applied
    for (int n = 0; n < 300; n++) begin
      d0 = fix_to_real(duty);
      ils = 5.0 - 0.5 * VREF * (1.0 - d0) * TS / L + ADV * VREF * TS / L;
      cycle(5.0, ils, VREF);
    end
    check(!comp_active && n_det == 0, "no compensation in steady state");
    check(fabs(fix_to_real(dut.io_est) - 5.0) < 0.05, $sformatf("load estimate %f", fix_to_real(dut.io_est)));
    // input step: one cycle at the old duty with 7.5 V, exact converter
    vop  = VREF + 5.0 * RLOSS;
    d0   = vop / 5.0;
    ival = 5.0 - 0.5 * vop * TS / L * (1.0 - d0);
    ip   = ival + d0 * TS * (7.5 - vop) / L;
    ie   = ip - (1.0 - d0) * TS * vop / L;
    vc   = VREF + (d0 * TS * (ival + ip) / 2.0 + (1.0 - d0) * TS * (ip + ie) / 2.0 - 5.0 * TS) / C;
    i1   = ie;
    vo1  = vc + (i1 - 5.0) * ESR;
    ils  = i1 + ADV * TS * vop / L;
    // reference prediction (load current 5 A)
    il1 = ils - ADV * vop * TS / L;
    dn  = vop / 7.5;
    ile = 5.0 - 0.5 * vop * TS / L * (1.0 - dn);
    k   = ((ile - il1) * L / TS + 2.0 * vop) / 7.5;
    q0  = C / TS * (vo1 - (il1 - 5.0) * ESR - VREF);
    x   = (1.0 + k) ** 2 + 4.0 * L / (7.5 * TS) * (il1 - 10.0 + ile - 0.5 * k * k * 7.5 * TS / L + q0);
    rd1 = 0.5 * ((1.0 + k) - $sqrt(x));
    rd2 = k - rd1;
    $display("reference d1 %.4f d2 %.4f D_new %.4f", rd1, rd2, dn);
    cycle(7.5, ils, vo1);
    check(comp_active && n_det == 1, "compensation started");
    check(fabs(fix_to_real(duty) - rd1) < 0.01, $sformatf("d1 %f, expected %f", fix_to_real(duty), rd1));
    cycle(7.5, ils, vo1);
    check(comp_active, "second cycle still compensating");
    check(fabs(fix_to_real(duty) - rd2) < 0.01, $sformatf("d2 %f, expected %f", fix_to_real(duty), rd2));
    cycle(7.5, ile + ADV * vop * TS / L, VREF);
    check(!comp_active && n_fin == 1, "PID back in control");
    check(fabs(fix_to_real(duty) - dn) < 0.002, $sformatf("D_new %f, expected %f", fix_to_real(duty), dn));
    cycle(7.5, ile + ADV * vop * TS / L, VREF);
    check(fabs(fix_to_real(duty) - dn) < 0.002, $sformatf("PID holds D_new: %f", fix_to_real(duty)));
    check(n_det == 1, "no second detection after the new base");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (320 * 250) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
