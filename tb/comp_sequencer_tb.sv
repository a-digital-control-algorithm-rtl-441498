// comp_sequencer_tb - walks the compensation flowchart through every branch
// A stand-in for the duty predictor answers each `pred_start` after 66 clocks
// with scripted d1/d2. Per sample the test records which pulses and events
// the sequencer produced and checks them, the duty it sends out and
// comp_active against the expected path: no detection below the threshold,
// detection, step 1, step 2, PID reset and new base, restart on a still
// moving input, clamped d1 (high and low) and clamped d2 with restarts.
`timescale 1ns/1ps
module comp_sequencer_tb;
  import dcdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic smp_valid = 1'b0, pred_start, pred_done = 1'b0;
  fix_t vin = '0, d1 = '0, d2 = '0, duty_comp;
  logic comp_active, pid_step, pid_load;
  comp_events_t ev;
  int checks = 0, failures = 0;

  comp_sequencer dut (.*);

  // scripted predictor
  real next_d1 = 0.0, next_d2 = 0.0;
  int  pending = -1;
  always @(posedge clk) begin
    pred_done <= 1'b0;
    if (pred_start) pending <= 65;
    else if (pending > 0) pending <= pending - 1;
    else if (pending == 0) begin
      pending   <= -1;
      pred_done <= 1'b1;
      d1 <= to_fix(next_d1);
      d2 <= to_fix(next_d2);
    end
  end

  // pulses seen since the last sample
  int n_start, n_step, n_load;
  comp_events_t seen;
  always @(posedge clk) begin
    if (pred_start) n_start++;
    if (pid_step)   n_step++;
    if (pid_load)   n_load++;
    seen <= seen | ev;
  end

  task automatic sample(real v);
    @(negedge clk);
    n_start = 0; n_step = 0; n_load = 0; seen = '0;
    vin = to_fix(v); smp_valid = 1'b1;
    @(negedge clk); smp_valid = 1'b0;
    repeat (100) @(negedge clk);     // rest of the cycle, predictor included
  endtask

  task automatic expect_path(string tag, int st, int sp, int ld, comp_events_t e,
                        logic act, real duty);
    checks++;
    if (n_start != st || n_step != sp || n_load != ld || seen != e || comp_active != act ||
        (act && duty_comp != to_fix(duty))) begin
      failures++;
      $display("FAIL %s: start %0d step %0d load %0d ev %b active %0d duty %f",
               tag, n_start, n_step, n_load, seen, comp_active, fix_to_real(duty_comp));
    end
  endtask

  localparam comp_events_t NONE  = '0;
  localparam comp_events_t DET   = 5'b10000;
  localparam comp_events_t RST   = 5'b01000;
  localparam comp_events_t CL1   = 5'b00100;
  localparam comp_events_t CL2   = 5'b00010;
  localparam comp_events_t FIN   = 5'b00001;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sample(5.0);    expect_path("base",            0, 1, 0, NONE, 0, 0.0);
    sample(5.2);    expect_path("below threshold", 0, 1, 0, NONE, 0, 0.0);
    next_d1 = 0.25; next_d2 = 0.40;
    sample(7.5);    expect_path("detect, d1",      1, 0, 0, DET,  1, 0.25);
    sample(7.5);    expect_path("step 2, d2",      0, 0, 0, NONE, 1, 0.40);
    sample(7.5);    expect_path("finish",          0, 0, 1, FIN,  0, 0.0);
    sample(7.5);    expect_path("new base",        0, 1, 0, NONE, 0, 0.0);
    // input still moving: restart
    next_d1 = 0.10; next_d2 = 0.50;
    sample(7.0);    expect_path("detect",          1, 0, 0, DET,  1, 0.10);
    next_d1 = 0.20; next_d2 = 0.45;
    sample(6.5);    expect_path("restart",         1, 0, 0, RST,  1, 0.20);
    sample(6.51);   expect_path("within tolerance",0, 0, 0, NONE, 1, 0.45);
    sample(6.5);    expect_path("finish 2",        0, 0, 1, FIN,  0, 0.0);
    // clamped d1, high then low
    next_d1 = 1.30; next_d2 = 0.10;
    sample(5.0);    expect_path("d1 clamp high",   1, 0, 0, DET | CL1, 1, 1.0);
    next_d1 = -0.20; next_d2 = 0.90;
    sample(5.0);    expect_path("d1 clamp low",    1, 0, 0, CL1,  1, 0.0);
    next_d1 = 0.60; next_d2 = 1.20;
    sample(5.0);    expect_path("recalc, d1",      1, 0, 0, NONE, 1, 0.60);
    sample(5.0);    expect_path("d2 clamp",        0, 0, 0, CL2,  1, 1.0);
    next_d1 = 0.55; next_d2 = 0.50;
    sample(5.0);    expect_path("recalc after d2", 1, 0, 0, NONE, 1, 0.55);
    sample(5.0);    expect_path("d2",              0, 0, 0, NONE, 1, 0.50);
    sample(5.0);    expect_path("finish 3",        0, 0, 1, FIN,  0, 0.0);
    sample(5.0);    expect_path("steady",          0, 1, 0, NONE, 0, 0.0);
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
