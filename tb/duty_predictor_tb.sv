// duty_predictor_tb - checks the two-cycle duty prediction
//
// Two kinds of check:
//  1. Random operating points: d1, d2, D_new, i_Lnew and no_solution are
//     compared with the same charge-balance formulas worked out in floating
//     point here (tolerances cover the Q16 rounding).
//  2. Physics: for input steps on an ideal buck (piecewise-linear inductor
//     current, default L, C, ESR, r_loss), the samples at point 1 are
//     computed from the converter, the predicted d1, d2 are applied to it for
//     two cycles, and the inductor current must land on its new valley value
//     and the capacitor voltage back on v_o' (charge balance).
// The latency must be at most 0.3 Ts = 75 clocks (sampling to turn-on).
`timescale 1ns/1ps
module duty_predictor_tb;
  import dcdc_pkg::*;
  localparam real L = 1.0e-6, C = 235.0e-6, TS = 2.5e-6, VREF = 2.5;
  localparam real ESR = 0.003, RLOSS = 0.010, ADV = 0.3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, no_solution;
  fix_t vin1 = '0, il_smp = '0, vo1 = '0, io = '0, d_prev = '0;
  fix_t d1, d2, d_new, il_new;
  int checks = 0, failures = 0, max_lat = 0;

  duty_predictor dut (.*);

  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction

  task automatic expect_near(real got, real want, real tol, string what);
    checks++;
    if (fabs(got - want) > tol) begin
      failures++;
      $display("FAIL: %s = %f, expected %f", what, got, want);
    end
  endtask

  task automatic predict(input real v, input real ils, input real vo, input real i0, input real dp);
    int lat;
    @(negedge clk);
    vin1 = to_fix(v); il_smp = to_fix(ils); vo1 = to_fix(vo); io = to_fix(i0); d_prev = to_fix(dp);
    start = 1'b1;
    @(negedge clk); start = 1'b0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (lat > max_lat) max_lat = lat;
    checks++;
    if (lat > 75) begin
      failures++;
      $display("FAIL: latency %0d clocks", lat);
    end
  endtask

  // floating-point reference of the prediction
  task automatic reference(input real v, input real ils, input real vo, input real i0, input real dp,
                           output real rd1, output real rd2, output real rdn, output real riln, output bit rneg);
    real vop, ton, il1, dn, ile, k, q0, x;
    vop = VREF + i0 * RLOSS;
    ton = (dp > 1.0 - ADV) ? dp - (1.0 - ADV) : 0.0;
    il1 = ils + (v * ton - ADV * vop) * TS / L;
    dn  = vop / v;
    ile = i0 - 0.5 * vop * TS / L * (1.0 - dn);
    k   = ((ile - il1) * L / TS + 2.0 * vop) / v;
    q0  = C / TS * (vo - (il1 - i0) * ESR - VREF);
    x   = (1.0 + k) ** 2 + 4.0 * L / (v * TS) * (il1 - 2.0 * i0 + ile - 0.5 * k * k * v * TS / L + q0);
    rneg = (x < 0.0);
    rd1 = 0.5 * ((1.0 + k) - ((x > 0.0) ? $sqrt(x) : 0.0));
    rd2 = k - rd1;
    rdn = dn;
    riln = ile + ADV * vop * TS / L;
  endtask

  // one switching cycle of an ideal buck: returns end current and capacitor voltage
  task automatic buck_cycle(inout real i, inout real vc, input real d, input real v, input real i0);
    real vop, ip, ie;
    vop = VREF + i0 * RLOSS;
    ip = i + d * TS * (v - vop) / L;
    ie = ip - (1.0 - d) * TS * vop / L;
    vc = vc + (d * TS * (i + ip) / 2.0 + (1.0 - d) * TS * (ip + ie) / 2.0 - i0 * TS) / C;
    i  = ie;
  endtask

  task automatic physics(input real v0, input real v1, input real i0);
    real vop, d0, i, vc, ils, vo, ile, c1, c2;
    vop = VREF + i0 * RLOSS;
    d0  = vop / v0;
    i   = i0 - 0.5 * vop * TS / L * (1.0 - d0);  // valley at point 0
    vc  = VREF;
    buck_cycle(i, vc, d0, v1, i0);               // T0: old duty, new input
    ils = i + ADV * TS * vop / L;                // sampled 0.3 Ts earlier
    vo  = vc + (i - i0) * ESR;
    predict(v1, ils, vo, i0, d0);
    c1 = fix_to_real(d1); c2 = fix_to_real(d2);
    buck_cycle(i, vc, c1, v1, i0);
    buck_cycle(i, vc, c2, v1, i0);
    ile = i0 - 0.5 * vop * TS / L * (1.0 - vop / v1);
    $display("step %.1f->%.1f V at %.1f A: d1 %.4f d2 %.4f, end current error %.4f A, end voltage error %.3f mV",
             v0, v1, i0, c1, c2, i - ile, (vc - VREF) * 1e3);
    expect_near(i, ile, 0.05, "inductor current at point 3");
    expect_near(vc, VREF, 0.0005, "capacitor voltage at point 3");
    expect_near(fix_to_real(d_new), vop / v1, 0.002, "D_new");
  endtask

  initial begin
    real v, ils, vo, i0, dp, rd1, rd2, rdn, riln;
    bit rneg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    physics(5.0, 7.5, 5.0);
    physics(5.0, 7.5, 0.0);
    physics(5.0, 6.0, 2.0);
    physics(7.5, 6.5, 5.0);
    for (int n = 0; n < 200; n++) begin
      v   = 3.0 + 9.0 * ($urandom % 1000) / 1000.0;
      i0  = 8.0 * ($urandom % 1000) / 1000.0;
      ils = i0 - 3.0 + 6.0 * ($urandom % 1000) / 1000.0;
      vo  = 2.4 + 0.2 * ($urandom % 1000) / 1000.0;
      dp  = ($urandom % 1001) / 1000.0;
      predict(v, ils, vo, i0, dp);
      reference(v, ils, vo, i0, dp, rd1, rd2, rdn, riln, rneg);
      expect_near(fix_to_real(d_new), rdn, 0.002, "D_new");
      expect_near(fix_to_real(il_new), riln, 0.01, "i_Lnew");
      if (!rneg) begin
        expect_near(fix_to_real(d1), rd1, 0.01, "d1");
        expect_near(fix_to_real(d2), rd2, 0.01, "d2");
      end
      checks++;
      if (no_solution !== rneg && fabs(rd1 - 0.5 * (1.0 + rd1 + rd2)) > 0.01) begin
        failures++;
        $display("FAIL: no_solution %0d expected %0d", no_solution, rneg);
      end
    end
    $display("latency %0d clocks", max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
