// tb_sqrt_ctrl: checks the controller's sequence against a model datapath.
//
// The testbench plays the datapath: six cycles after each launch pulse it
// raises tree_valid for one cycle, as the four-stage iterative block and the
// two-level comparison tree do, and reports a zero remainder at a chosen
// iteration (or never). It checks the handshake (ready, x_load, a start while
// busy being ignored), the table read cycle, the launch pulses, the block
// position sequence 10, 8, ..., 0 of the default size, use_rom only for the
// first iteration, q_load with every winner, the early stop, the iteration
// count and the 1 + 7k cycle latency.
module tb_sqrt_ctrl;

  localparam int ITERS = 6;
  localparam int POS0  = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, start, tree_valid, rem_zero;
  logic       ready, x_load, rom_en, launch, use_rom, q_load, done;
  logic [3:0] pos;
  logic [2:0] iter_count;

  sqrt_ctrl dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Model datapath: tree_valid six cycles after launch.
  logic [6:1] dly;
  always_ff @(posedge clk) dly <= rst_n ? {dly[5:1], launch} : '0;
  assign tree_valid = dly[6];

  // One operation; zero_at = iteration whose remainder is zero, 0 = none.
  task automatic run(input int zero_at, input bit busy_start);
    int exp_it, cyc, it;
    exp_it = (zero_at > 0 && zero_at < ITERS) ? zero_at : ITERS;
    check(ready, "ready before start");
    start = 1'b1;
    #1 check(x_load, "x_load with start while ready");
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 0;
    it  = 0;
    check(!ready && rom_en, "table read in the cycle after start");
    forever begin
      rem_zero = tree_valid && (it + 1 == zero_at);
      #1;
      if (busy_start && cyc == 4) begin
        start = 1'b1;
        #1 check(!x_load, "start ignored while busy");
      end
      if (launch) begin
        check(pos == 4'(POS0 - 2 * it), $sformatf("pos %0d at iteration %0d", pos, it + 1));
        check(use_rom == (it == 0), "use_rom only for the first iteration");
      end
      check(q_load == tree_valid, "q_load with the tree winner");
      if (tree_valid) it++;
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
      if (done || cyc > 200) break;
    end
    check(done, "done");
    check(cyc == 1 + 7 * exp_it, $sformatf("latency %0d exp %0d", cyc, 1 + 7 * exp_it));
    check(int'(iter_count) == exp_it, $sformatf("iter_count %0d exp %0d", iter_count, exp_it));
    check(ready, "ready with done");
    rem_zero = 1'b0;
    repeat (8) begin
      @(posedge clk); #1;
      check(!done && !launch && !tree_valid, "quiet after done");
    end
    if (exp_it < ITERS) n_early++; else n_full++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; rem_zero = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int z = 0; z <= ITERS; z++) run(z, z % 2 == 1);
    for (int i = 0; i < 30; i++) run($urandom % (ITERS + 2), i % 3 == 0);
    check(n_early > 0 && n_full > 0, "both early and full runs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
