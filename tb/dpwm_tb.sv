// dpwm_tb - checks the switching period, on-time, dead time and sample strobe
// For a sweep of 8-bit duties (with the word changed mid-cycle to show it is
// only taken at the cycle end) each switching cycle is measured: it must be
// 250 clocks long, S1 must be on for floor(d8 x 250 / 256) clocks starting
// at the cycle start, S1 and S2 must never be on together and must each be
// separated by at least 2 off clocks, and the ADC strobe must come exactly
// once per cycle, 75 clocks (0.3 Ts) before S1 turns on.
`timescale 1ns/1ps
module dpwm_tb;
  import dcdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] d8 = '0;
  logic gate_s1, gate_s2, cycle_tick, smp_strobe;
  int checks = 0, failures = 0;

  dpwm dut (.*);

  task automatic fail(string m);
    failures++;
    $display("FAIL: %s", m);
  endtask

  // dead time: count clocks with both switches off; when one turns on after
  // the other was the last one on, at least DEADTIME = 2 such clocks must lie between
  int off_run = 0;
  int last_on = 0;          // 1: S1 was on last, 2: S2
  always @(posedge clk) if (rst_n) begin
    if (gate_s1 && gate_s2) fail("S1 and S2 on together");
    if (gate_s1 || gate_s2) begin
      if (off_run > 0 || last_on != 0) begin
        if (gate_s1 && last_on == 2 && off_run < 2) fail("dead time before S1");
        if (gate_s2 && last_on == 1 && off_run < 2) fail("dead time before S2");
      end
      last_on = gate_s1 ? 1 : 2;
      off_run = 0;
    end else off_run++;
  end

  initial begin
    int on_cnt, strobes, strobe_at;
    logic [7:0] applied;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin @(posedge clk); #1; end while (!cycle_tick);
    for (int k = 0; k < 260; k++) begin
      // the next clock edge takes this word for the next cycle
      d8 = (k < 256) ? 8'(k) : 8'($urandom);
      applied = d8;
      on_cnt = 0; strobes = 0; strobe_at = -1;
      for (int c = 0; c < 250; c++) begin
        @(posedge clk);
        #1;
        // gates are registered: they show count c-1 of this cycle
        if (c > 0 && gate_s1) on_cnt++;
        if (smp_strobe) begin strobes++; strobe_at = c; end
        if (c == 124) d8 = ~d8;            // mid-cycle change, must be ignored
      end
      checks++;
      if (!cycle_tick) fail("cycle is not 250 clocks long");
      checks++;
      if (on_cnt != (int'(applied) * 250) / 256)
        fail($sformatf("d8 %0d: on for %0d clocks, want %0d", applied, on_cnt, (int'(applied) * 250) / 256));
      checks++;
      if (strobes != 1 || strobe_at != 250 - 75)
        fail($sformatf("strobe count %0d at count %0d", strobes, strobe_at));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (270 * 250) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
