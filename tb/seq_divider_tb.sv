// seq_divider_tb - checks quotient, remainder and latency of the iterative divider
// against the simulator's own division, for edge cases and random operands,
// at the width the duty predictor uses (33 bits) for the reciprocal 2^32/v.
`timescale 1ns/1ps
module seq_divider_tb;
  localparam int unsigned W = 33;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [W-1:0] num = '0, den = '0, quot, rem;
  int checks = 0, failures = 0;

  seq_divider #(.W(W)) dut (.*);

  task automatic run(input logic [W-1:0] n, input logic [W-1:0] d);
    int lat;
    logic [W-1:0] eq, er;
    @(negedge clk); num = n; den = d; start = 1'b1;
    @(negedge clk); start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    eq = (d == 0) ? '1 : n / d;
    er = (d == 0) ? n : n % d;
    checks++;
    if (quot !== eq || (d != 0 && rem !== er) || lat != W + 1) begin
      failures++;
      $display("FAIL: %0d / %0d -> q %0d r %0d lat %0d (want %0d %0d %0d)", n, d, quot, rem, lat, eq, er, W + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(33'h1_0000_0000, 33'd65536);          // 1/1.0 V
    run(33'h1_0000_0000, 33'd491520);         // 1/7.5 V
    run(33'h1_0000_0000, 33'd327680);         // 1/5 V
    run(33'd7, 33'd7);
    run(33'd6, 33'd7);
    run('1, 33'd1);
    run(33'd12345, 33'd0);
    repeat (300) run({$urandom, $urandom} % (64'd1 << W), W'($urandom % 2000000) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
