// seq_sqrt_tb - checks floor(sqrt) and latency of the iterative square root
// (r^2 <= x < (r+1)^2, W+1 clocks) for edge cases and random 48-bit radicands.
`timescale 1ns/1ps
module seq_sqrt_tb;
  localparam int unsigned W = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [2*W-1:0] radicand = '0;
  logic [W-1:0] root;
  int checks = 0, failures = 0;

  seq_sqrt #(.W(W)) dut (.*);

  task automatic run(input logic [2*W-1:0] x);
    int lat;
    logic [63:0] r, lo, hi;
    @(negedge clk); radicand = x; start = 1'b1;
    @(negedge clk); start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r  = 64'(root);
    lo = r * r;
    hi = (r + 1) * (r + 1);
    checks++;
    if (!(lo <= 64'(x) && 64'(x) < hi) || lat != W + 1) begin
      failures++;
      $display("FAIL: sqrt(%0d) -> %0d lat %0d", x, root, lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('0); run(48'd1); run(48'd2); run(48'd3); run(48'd4); run(48'd15); run(48'd16);
    run('1);
    run(48'd65536 << 16);           // sqrt(1.0) in Q16 -> 65536
    run(48'd138298 << 16);          // about sqrt(2.11)
    repeat (300) run(48'({$urandom, $urandom}));
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
