// tb_sqrt_cfg_check: runs one size of the square root module against its
// published cycle count.
//
// Instantiates sqrt_module with the given radicand width, table size and
// iterative block size and feeds it random radicands of every magnitude plus
// perfect squares. Each result is compared with the independent reference of
// sqrt_ref_pkg, and each latency with 1 + (5+P)*iterations. A full-resolution
// run must take exactly TABLE_CYCLES, the figure evaluated for that size
// (not checked when TABLE_CYCLES is 0).
// Raises fin when done; checks/failures are read by the enclosing testbench.
module tb_sqrt_cfg_check #(
  parameter int W            = 16,
  parameter int ROM          = 4,
  parameter int TABLE_CYCLES = 22,
  parameter int RUNS         = 100,
  parameter int P            = 2     // root bits per iteration
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   n_early,
  output int   n_full
);
  import sqrt_ref_pkg::*;

  localparam int ITERS = (W / 2 - ROM / 2) / P;

  logic          start, ready, done, exact;
  logic [W-1:0]  x;
  logic [W/2-1:0] root;
  logic [W/2:0]  remainder;
  logic [$clog2(ITERS+1)-1:0] iterations;

  sqrt_module #(.IN_WIDTH(W), .ROM_BITS(ROM), .BLOCK_BITS(P)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL W=%0d ROM=%0d: %s", W, ROM, what); end
  endtask

  function automatic logic [W-1:0] rand_w();
    logic [127:0] r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return W'(r >> ($urandom % W));
  endfunction

  task automatic run(input logic [W-1:0] v);
    u128_t s;
    int    exp_it, cyc;
    s      = ref_isqrt(u128_t'(v), W);
    exp_it = ref_iters(u128_t'(v), W, ROM, P);
    while (!ready) begin @(posedge clk); #1; end
    start = 1'b1;
    x     = v;
    @(posedge clk); #1;
    start = 1'b0;
    cyc   = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 1000);
    check(root == s[W/2-1:0], $sformatf("root of %0h", v));
    check(remainder == (W/2+1)'(u128_t'(v) - s * s), $sformatf("remainder of %0h", v));
    check(exact == (s * s == u128_t'(v)), "exact flag");
    check(int'(iterations) == exp_it, "iterations");
    check(cyc == 1 + (5 + P) * exp_it, $sformatf("latency %0d exp %0d", cyc, 1 + (5 + P) * exp_it));
    if (exp_it == ITERS) begin
      n_full++;
      if (TABLE_CYCLES > 0) check(cyc == TABLE_CYCLES, $sformatf("full latency %0d, evaluated %0d", cyc, TABLE_CYCLES));
    end else n_early++;
  endtask

  initial begin
    logic [W/2-1:0] r;
    fin = 1'b0; checks = 0; failures = 0; n_early = 0; n_full = 0;
    start = 1'b0; x = '0;
    @(posedge clk iff rst_n); #1;
    run('1);
    if (W >= 32) begin
      // 14.0625 with W/2 + 4 fraction bits: the root 3.75 ends in zeros and
      // stops early.
      run(W'(225) << (W / 2));
    end
    for (int i = 0; i < RUNS; i++) begin
      run(rand_w());
      r = (W/2)'({$urandom, $urandom} >> ($urandom % W));
      run(W'(r) * W'(r));
    end
    fin = 1'b1;
  end

endmodule
