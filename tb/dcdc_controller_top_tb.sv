// dcdc_controller_top_tb - closed-loop test of the controller with a buck power stage
//
// A behavioural synchronous buck (L, C with ESR, loss resistance, ideal
// switches with body diodes in the dead time) is integrated in 10 ns steps
// from the gate outputs and sampled into the three 9-bit converter words.
// With the top at its default parameters it runs these input-voltage steps:
//   A  5 V -> 7.5 V in 20 us, 5 A load
//   B  5 V -> 7.5 V in 20 us, no load
//   C  7.5 V -> 5 V in 40 us, 5 A load
//   D  as A with the power-stage L and C 20 % above the controller's values
//   E  as A with L and C 20 % below
//   F  5 V -> 7.5 V at once (one plain two-cycle compensation), 5 A
//   G  7.5 V -> 5 V at once, 5 A (d1 leaves [0,1] and is clamped)
// Each case starts from reset, lets the PID loop settle, then applies the
// step. Case F must be over in exactly two compensated switching cycles. Checked per case: the output voltage before the step, the largest
// deviation from the moment the input starts to move, the time until the
// compensation hands back to the PID, and the output voltage at the end.
// It also counts how often each mechanism happened (detection, restart on a
// still-moving input, clamped d1, clamped d2, PID reset, PID steady-state
// update, dithered duty) and counts a failure for one that never did.
`timescale 1ns/1ps
module dcdc_controller_top_tb;
  import dcdc_pkg::*;

  localparam real DT      = 10.0e-9;
  localparam real VREF    = 2.5;
  localparam real ESR     = 0.003;
  localparam real RLOSS   = 0.010;
  localparam int  PERIOD  = 250;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        [8:0] adc_vin, adc_vo;
  logic signed [8:0] adc_il;
  logic adc_sample, gate_s1, gate_s2, comp_active;
  logic [9:0] d10;
  logic [7:0] d8;
  comp_events_t events;

  dcdc_controller_top dut (
    .clk, .rst_n,
    .adc_vin, .adc_il, .adc_vo, .adc_sample,
    .gate_s1, .gate_s2,
    .d10, .d8, .comp_active, .events
  );

  // ---------------- power stage ----------------
  real vin, io, il, vc, vo, lval, cval;
  real vin_from, vin_to; int ramp_clks, ramp_t; bit ramping;

  function automatic int quant(real v, real lsb, int lo, int hi);
    int c;
    c = $rtoi(v / lsb + ((v >= 0.0) ? 0.5 : -0.5));
    if (c < lo) c = lo;
    if (c > hi) c = hi;
    return c;
  endfunction

  always_comb begin
    adc_vin = 9'(quant(vin, 1.0/32.0, 0, 511));
    adc_vo  = 9'(quant(vo, 1.0/128.0, 0, 511));
    adc_il  = 9'(quant(il, 1.0/16.0, -256, 255));
  end

  always @(posedge clk) begin
    real vsw, ic;
    if (ramping) begin
      ramp_t = ramp_t + 1;
      if (ramp_t >= ramp_clks) begin vin = vin_to; ramping = 0; end
      else vin = vin_from + (vin_to - vin_from) * ramp_t / ramp_clks;
    end
    if (gate_s1)      vsw = vin;
    else if (gate_s2) vsw = 0.0;
    else              vsw = (il > 0.0) ? 0.0 : vin;
    ic = il - io;
    vo = vc + ic * ESR;
    il = il + (vsw - il * RLOSS - vo) / lval * DT;
    vc = vc + ic / cval * DT;
    vo = vc + (il - io) * ESR;
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_detect = 0, n_restart = 0, n_clamp1 = 0, n_clamp2 = 0, n_finish = 0;
  int n_pidstep = 0, n_dither = 0;
  int cyc = 0;
  logic [7:0] d8_prev;

  always @(posedge clk) begin
    if (events.detect)      n_detect++;
    if (events.restart_vin) n_restart++;
    if (events.clamp_d1)    n_clamp1++;
    if (events.clamp_d2)    n_clamp2++;
    if (events.finish)      n_finish++;
    if (dut.u_ctrl.pid_step) n_pidstep++;
    if (dut.u_dpwm.cycle_tick) begin
      cyc++;
      if (d10[1:0] != 2'b00 && d8 != d8_prev) n_dither++;
      d8_prev <= d8;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n * PERIOD) @(posedge clk);
  endtask

  // run one case; limits in volts and switching cycles
  task automatic run_case(input string name, input real v0, input real v1,
                          input real t_ramp_us, input real iload,
                          input real lscale, input real cscale,
                          input real dev_lim, input int rec_lim,
                          input bit two_cycle = 0);
    real vmax, vmin, dev, vsettle;
    int  t_first, t_last, start_cyc, det0, rst0;
    bit  seen;
    rst_n = 0;
    vin = v0; io = iload; lval = 1.0e-6 * lscale; cval = 235.0e-6 * cscale;
    il = iload; vc = VREF; vo = VREF; ramping = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait_cycles(1200);
    vsettle = vo;
    check(vo > VREF - 0.02 && vo < VREF + 0.03, $sformatf("%s: settled vo %f before step", name, vo));
    check(!comp_active, $sformatf("%s: compensation idle before step", name));
    // apply the input change
    vin_from = v0; vin_to = v1; ramp_t = 0;
    ramp_clks = (t_ramp_us > 0.0) ? $rtoi(t_ramp_us * 100.0) : 1;
    ramping = 1;
    start_cyc = cyc; det0 = n_detect; rst0 = n_restart;
    vmax = vo; vmin = vo; seen = 0; t_first = -1; t_last = -1;
    repeat (400 * PERIOD) begin
      @(posedge clk);
      if (vo > vmax) vmax = vo;
      if (vo < vmin) vmin = vo;
      if (comp_active) begin
        if (t_first < 0) t_first = cyc - start_cyc;
        t_last = cyc - start_cyc;
      end
    end
    dev = ((vmax - vsettle) > (vsettle - vmin)) ? (vmax - vsettle) : (vsettle - vmin);
    $display("%s: vin %.2f->%.2f in %.0fus, io %.1fA, L x%.1f C x%.1f: before %.4f V, peak dev %.1f mV, comp cycles %0d..%0d, end %.4f V",
             name, v0, v1, t_ramp_us, iload, lscale, cscale, vsettle, dev * 1e3, t_first, t_last, vo);
    check(n_detect > det0, $sformatf("%s: input change detected", name));
    check(dev < dev_lim, $sformatf("%s: peak deviation %f mV above %f mV", name, dev * 1e3, dev_lim * 1e3));
    check(t_last >= 0 && t_last < rec_lim, $sformatf("%s: compensation ended at cycle %0d", name, t_last));
    check(!comp_active, $sformatf("%s: back under PID", name));
    // a step that is over before it is sampled needs exactly the two
    // predicted cycles: detection in one cycle, d1, d2, then the PID again
    if (two_cycle)
      check(t_first >= 0 && t_last - t_first == 2 && n_restart == rst0,
            $sformatf("%s: compensation took cycles %0d..%0d", name, t_first, t_last));
    check(vo > VREF - 0.02 && vo < VREF + 0.03, $sformatf("%s: vo %f at end", name, vo));
  endtask

  initial begin
    run_case("A", 5.0, 7.5, 20.0, 5.0, 1.0, 1.0, 0.030, 20);
    run_case("B", 5.0, 7.5, 20.0, 0.0, 1.0, 1.0, 0.030, 20);
    run_case("C", 7.5, 5.0, 40.0, 5.0, 1.0, 1.0, 0.030, 30);
    run_case("D", 5.0, 7.5, 20.0, 5.0, 1.2, 1.2, 0.030, 20);
    run_case("E", 5.0, 7.5, 20.0, 5.0, 0.8, 0.8, 0.030, 20);
    run_case("F", 5.0, 7.5, 0.0,  5.0, 1.0, 1.0, 0.050, 20, 1);
    run_case("G", 7.5, 5.0, 0.0,  5.0, 1.0, 1.0, 0.050, 20);
    $display("mechanisms: detect %0d restart %0d clamp_d1 %0d clamp_d2 %0d finish %0d pid_steps %0d dither %0d",
             n_detect, n_restart, n_clamp1, n_clamp2, n_finish, n_pidstep, n_dither);
    check(n_detect  > 0, "detection never happened");
    check(n_restart > 0, "restart on moving input never happened");
    check(n_clamp1 + n_clamp2 > 0, "duty clamping never happened");
    check(n_finish  > 0, "PID reset never happened");
    check(n_pidstep > 0, "PID never ran");
    check(n_dither  > 0, "dither never changed the 8-bit duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * 1700 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
