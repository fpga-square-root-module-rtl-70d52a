// tb_sqrt_cmp_tree: checks the minimal-remainder comparison tree.
//
// A new set of remainders enters on every cycle (the tree is fully
// pipelined). Each set mixes negative remainders (candidates that are too
// large), ties and all-negative corner cases. The expected winner, found by
// a linear scan, is the smallest non-negative remainder, preferring the
// lower index on a tie; when all are negative the winner is only checked to
// be flagged negative. Results must appear exactly BLOCK_BITS cycles later.
// The default 2-level tree and a 3-level tree are both tested.
module tb_sqrt_cmp_tree;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic             iv, ov, mneg;
  logic [3:0]       neg;
  logic [3:0][31:0] rem;
  logic [1:0]       midx;
  logic [31:0]      mrem;

  sqrt_cmp_tree dut (
    .clk, .rst_n, .in_valid(iv), .rem_neg(neg), .rem,
    .out_valid(ov), .min_idx(midx), .min_rem(mrem), .min_neg(mneg)
  );

  logic             iv3, ov3, mneg3;
  logic [7:0]       neg3;
  logic [7:0][15:0] rem3;
  logic [2:0]       midx3;
  logic [15:0]      mrem3;

  sqrt_cmp_tree #(.IN_WIDTH(16), .BLOCK_BITS(3)) dut3 (
    .clk, .rst_n, .in_valid(iv3), .rem_neg(neg3), .rem(rem3),
    .out_valid(ov3), .min_idx(midx3), .min_rem(mrem3), .min_neg(mneg3)
  );

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

  typedef struct { bit allneg; int idx; longint rem; } exp_t;
  exp_t q2 [$];
  exp_t q3 [$];
  int   n_allneg = 0;

  // Launch bookkeeping: results due BLOCK_BITS cycles after entry.
  bit v2 [$];
  bit v3 [$];

  function automatic exp_t scan(input int n, input logic [7:0] ng,
                                input longint r [8]);
    exp_t e;
    e.allneg = 1'b1;
    e.idx    = -1;
    e.rem    = 0;
    for (int j = 0; j < n; j++) begin
      if (!ng[j] && (e.idx < 0 || r[j] < e.rem)) begin
        e.idx = j; e.rem = r[j]; e.allneg = 1'b0;
      end
    end
    return e;
  endfunction

  initial begin
    rst_n = 1'b0; iv = 1'b0; iv3 = 1'b0; neg = '0; rem = '0; neg3 = '0; rem3 = '0;
    v2.push_back(1'b0);
    for (int k = 0; k < 2; k++) v3.push_back(1'b0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint r [8];
      exp_t   e2, e3, g2, g3;
      bit     w2, w3;
      // Default tree inputs.
      iv = ($urandom % 4) != 0;
      for (int j = 0; j < 4; j++) begin
        rem[j] = (i % 3 == 0) ? 32'($urandom % 4) : $urandom;
        neg[j] = ($urandom % 3) == 0;
        r[j]   = longint'(rem[j]);
      end
      if (i % 50 == 0) neg = '1;
      e2 = scan(4, 8'(neg), r);
      // 3-level tree inputs.
      iv3 = ($urandom % 2) != 0;
      for (int j = 0; j < 8; j++) begin
        rem3[j] = 16'($urandom % ((i % 2 == 0) ? 8 : 65536));
        neg3[j] = ($urandom % 3) == 0;
        r[j]    = longint'(rem3[j]);
      end
      e3 = scan(8, neg3, r);
      q2.push_back(e2); v2.push_back(iv);
      q3.push_back(e3); v3.push_back(iv3);
      @(posedge clk); #1;
      // Results of the sets entered 1 (2) edges before the last one.
      w2 = v2.pop_front();
      w3 = v3.pop_front();
      check(ov == w2, "out_valid timing, 2 levels");
      check(ov3 == w3, "out_valid timing, 3 levels");
      if (q2.size() > 1) begin
        g2 = q2.pop_front();
        if (w2) begin
          if (g2.allneg) begin n_allneg++; check(mneg, "all negative flagged"); end
          else begin
            check(!mneg, "winner non-negative");
            check(longint'(mrem) == g2.rem, $sformatf("min rem %0d exp %0d", mrem, g2.rem));
            check(int'(midx) == g2.idx, $sformatf("min idx %0d exp %0d", midx, g2.idx));
          end
        end
      end
      if (q3.size() > 2) begin
        g3 = q3.pop_front();
        if (w3 && !g3.allneg) begin
          check(!mneg3, "3-level winner non-negative");
          check(longint'(mrem3) == g3.rem, "3-level min rem");
          check(int'(midx3) == g3.idx, "3-level min idx");
        end
      end
    end
    check(n_allneg > 0, "all-negative case never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
