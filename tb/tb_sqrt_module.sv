// tb_sqrt_module: end-to-end test of the square root module at its default
// size (32-bit radicand, 8-bit table index, 2-bit iterative block).
//
// Every result is compared with an independent restoring square root
// (sqrt_ref_pkg): root, remainder, exact flag and the number of iterations.
// The latency from the accepted start to done is checked against
// 1 + 7*iterations. The radicands cover zero, the largest value, perfect
// squares whose roots stop after each possible iteration (early stop on an
// exact root), exact roots found only at the last iteration, the worked
// example 14.0625 -> 3.75 in a fixed-point reading, and random values. Some
// runs also pulse start while busy, which must be ignored, and some start
// again in the cycle right after done. Each of these events is counted and a
// failure is recorded for any that never happened.
module tb_sqrt_module;
  import sqrt_ref_pkg::*;

  localparam int W     = 32;
  localparam int ROM   = 8;
  localparam int P     = 2;
  localparam int ITERS = (W / 2 - ROM / 2) / P;
  localparam int HW    = W / 2;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [W-1:0]  x;
  logic          ready, done, exact;
  logic [W/2-1:0] root;
  logic [W/2:0]  remainder;
  logic [$clog2(ITERS+1)-1:0] iterations;

  int checks = 0, failures = 0;
  int n_early = 0, n_full_inexact = 0, n_full_exact = 0, n_busy_start = 0;
  int n_back_to_back = 0;
  int early_at [ITERS+1];

  always #5 clk = ~clk;

  sqrt_module dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one square root. busy_pulse: also pulse start with another radicand
  // in the middle of the computation. Returns with the clock just past done.
  task automatic run(input logic [W-1:0] v, input bit busy_pulse);
    u128_t s;
    int    exp_it, cyc;
    s      = ref_isqrt(u128_t'(v), W);
    exp_it = ref_iters(u128_t'(v), W, ROM, P);
    while (!ready) begin @(posedge clk); #1; end
    start = 1'b1;
    x     = v;
    @(posedge clk); #1;            // accepted at this edge
    start = 1'b0;
    x     = ~v;                    // x is registered: changing it is harmless
    cyc   = 0;
    forever begin
      if (busy_pulse && cyc == 3) begin
        start = 1'b1;
        check(!ready, "ready low while busy");
        n_busy_start++;
      end else start = 1'b0;
      @(posedge clk); #1;
      cyc++;
      if (done || cyc > 2000) break;
    end
    start = 1'b0;
    check(done, $sformatf("done for x=%0h", v));
    check(root == s[W/2-1:0], $sformatf("root x=%0h got %0h exp %0h", v, root, s));
    check(remainder == (W/2+1)'(u128_t'(v) - s * s),
          $sformatf("remainder x=%0h got %0h", v, remainder));
    check(exact == (s * s == u128_t'(v)), $sformatf("exact x=%0h", v));
    check(int'(iterations) == exp_it, $sformatf("iterations x=%0h got %0d exp %0d", v, iterations, exp_it));
    check(cyc == 1 + 7 * exp_it, $sformatf("latency x=%0h got %0d exp %0d", v, cyc, 1 + 7 * exp_it));
    if (exp_it < ITERS) begin n_early++; early_at[exp_it]++; end
    else if (s * s == u128_t'(v)) n_full_exact++;
    else n_full_inexact++;
  endtask

  initial begin
    logic [W/2-1:0] r;
    rst_n = 1'b0;
    start = 1'b0;
    x     = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(ready && !done, "idle after reset");

    run('0, 1'b0);
    run(32'd1, 1'b0);
    run(32'd5, 1'b0);
    run('1, 1'b0);
    run(32'h0000_00E1, 1'b0);      // 14.0625 with 4 fraction bits -> 3.75
    run(32'h0E10_0000, 1'b0);      // 14.0625 with 24 fraction bits -> 3.75
    // Perfect squares whose roots end in 0..15 zero bits.
    for (int tz = 0; tz < W / 2; tz++) begin
      r = HW'(($urandom | 1) << tz);
      if (r == '0) r = HW'(1) << tz;
      run(W'(r) * W'(r), tz % 3 == 0);
    end
    // Random radicands, some pulsing start while busy.
    for (int i = 0; i < 300; i++) begin
      run($urandom, i % 7 == 0);
    end
    // Back-to-back: start again right after done.
    for (int i = 0; i < 20; i++) begin
      run($urandom >> (i % 32), 1'b0);
      n_back_to_back++;
    end

    // Every mechanism must have happened.
    check(n_early > 0, "early stop on exact root never happened");
    for (int i = 1; i < ITERS; i++)
      check(early_at[i] > 0, $sformatf("no early stop after iteration %0d", i));
    check(n_full_inexact > 0, "full-resolution run never happened");
    check(n_full_exact > 0, "exact root at last iteration never happened");
    check(n_busy_start > 0, "start while busy never happened");
    $display("early stops %0d, full runs %0d (+%0d exact), starts while busy %0d",
             n_early, n_full_inexact, n_full_exact, n_busy_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
