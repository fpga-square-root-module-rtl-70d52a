// tb_sqrt_configs: every radicand width / table size evaluated for the
// square root module, each against its published cycle count.
//
// Sizes (2-bit iterative block), with the cycles of a full-resolution result:
//   4-bit table:  16-bit 22, 32-bit 50, 48-bit 78, 64-bit 106
//   8-bit table:  16-bit 15, 32-bit 43, 48-bit 71
//   12-bit table: 16-bit 8,  32-bit 36, 48-bit 64, 64-bit 92
// All follow 1 + 7*(IN_WIDTH/2 - ROM_BITS/2)/2. A twelfth size, a 64-bit
// radicand with a 16-bit table and 4-bit blocks, resolves the root in six
// iterations, the iteration count quoted for a 64-bit radicand; no cycle
// count is published for it, so only results and 1 + 9*k latency are
// checked. Each size runs in its own
// tb_sqrt_cfg_check instance; exact roots that stop early are counted too.
module tb_sqrt_configs;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 12;
  localparam int CW  [NCFG] = '{16, 32, 48, 64, 16, 32, 48, 16, 32, 48, 64, 64};
  localparam int CR  [NCFG] = '{ 4,  4,  4,  4,  8,  8,  8, 12, 12, 12, 12, 16};
  localparam int CC  [NCFG] = '{22, 50, 78, 106, 15, 43, 71, 8, 36, 64, 92, 0};
  localparam int CP  [NCFG] = '{ 2,  2,  2,  2,  2,  2,  2,  2,  2,  2,  2,  4};

  logic [NCFG-1:0] fin;
  int chk [NCFG];
  int fl  [NCFG];
  int ne  [NCFG];
  int nf  [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    tb_sqrt_cfg_check #(.W(CW[g]), .ROM(CR[g]), .TABLE_CYCLES(CC[g]), .RUNS(60), .P(CP[g])) u (
      .clk, .rst_n, .fin(fin[g]), .checks(chk[g]), .failures(fl[g]),
      .n_early(ne[g]), .n_full(nf[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&fin);
    for (int i = 0; i < NCFG; i++) begin
      $display("IN_WIDTH=%0d ROM_BITS=%0d BLOCK_BITS=%0d: %0d checks, %0d failures, %0d full runs, %0d early stops",
               CW[i], CR[i], CP[i], chk[i], fl[i], nf[i], ne[i]);
      checks   += chk[i] + 2;
      failures += fl[i];
      if (nf[i] == 0) failures++;
      // A size with a single iteration has no earlier point to stop at.
      if (ne[i] == 0 && (CW[i] / 2 - CR[i] / 2) / CP[i] > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
