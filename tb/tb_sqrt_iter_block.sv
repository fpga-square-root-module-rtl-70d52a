// tb_sqrt_iter_block: checks the candidate/square/remainder pipeline.
//
// Random radicands, roots-so-far and block positions are launched, some back
// to back and some with idle gaps. For each launch the testbench expects,
// exactly four cycles later, out_valid together with the candidates
// base | (j << pos), the remainders x - cand^2 and their negative flags,
// all worked out here with 64-bit arithmetic. Both the default 32-bit,
// 2-bit-block size and a 16-bit, 3-bit-block instance are exercised.
module tb_sqrt_iter_block;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  // Default instance.
  logic              iv, ov;
  logic [31:0]       x;
  logic [15:0]       base;
  logic [3:0]        pos;
  logic [3:0][15:0]  cand;
  logic [3:0]        neg;
  logic [3:0][31:0]  rem;

  sqrt_iter_block dut (
    .clk, .rst_n, .in_valid(iv), .x, .base, .pos,
    .out_valid(ov), .cand, .rem_neg(neg), .rem
  );

  // Small instance with 8 candidates.
  logic              iv3, ov3;
  logic [15:0]       x3;
  logic [7:0]        base3;
  logic [2:0]        pos3;
  logic [7:0][7:0]   cand3;
  logic [7:0]        neg3;
  logic [7:0][15:0]  rem3;

  sqrt_iter_block #(.IN_WIDTH(16), .BLOCK_BITS(3)) dut3 (
    .clk, .rst_n, .in_valid(iv3), .x(x3), .base(base3), .pos(pos3),
    .out_valid(ov3), .cand(cand3), .rem_neg(neg3), .rem(rem3)
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

  // Expected results, launched at cycle t, due at cycle t+4.
  typedef struct { logic [31:0] x; logic [15:0] base; int pos; } req_t;
  req_t pend [$];
  int   due  [$];
  int   cyc = 0;

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n) begin
      if (due.size() > 0 && due[0] == cyc) begin
        req_t r;
        longint c, sq, d;
        r = pend.pop_front();
        void'(due.pop_front());
        check(ov, $sformatf("out_valid at cycle %0d", cyc));
        for (int j = 0; j < 4; j++) begin
          c  = longint'(r.base) | (longint'(j) << r.pos);
          sq = c * c;
          d  = longint'(r.x) - sq;
          check(cand[j] == 16'(c), $sformatf("cand[%0d]", j));
          check(neg[j] == (d < 0), $sformatf("neg[%0d] x=%0h c=%0h", j, r.x, c));
          check(rem[j] == 32'(d), $sformatf("rem[%0d] x=%0h c=%0h", j, r.x, c));
        end
      end else begin
        check(!ov, $sformatf("spurious out_valid at cycle %0d", cyc));
      end
    end
  end

  initial begin
    rst_n = 1'b0; iv = 1'b0; iv3 = 1'b0;
    x = '0; base = '0; pos = '0; x3 = '0; base3 = '0; pos3 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #2;
    // Default instance: random launches, one per 1..3 cycles. x is held for
    // the pipeline depth, as the controller does.
    for (int i = 0; i < 400; i++) begin
      int p;
      logic [15:0] b;
      p = 2 * ($urandom % 7);                 // even positions 0..12
      b = 16'($urandom) & ~((16'd4 << p) - 16'd1);
      x    = $urandom;
      if (i % 5 == 0) x = 32'(b) * 32'(b) + 32'($urandom % 8);
      base = b;
      pos  = 4'(p);
      iv   = 1'b1;
      pend.push_back('{x, b, p});
      due.push_back(cyc + 4);
      @(posedge clk); #2;
      iv = 1'b0;
      repeat (4) @(posedge clk);
      #2;
    end
    repeat (6) @(posedge clk);
    #2;
    // Small instance: all 8 candidates, checked directly.
    for (int i = 0; i < 200; i++) begin
      int p;
      logic [7:0] b;
      p     = 3 * ($urandom % 2);
      b     = 8'($urandom) & ~((8'd8 << p) - 8'd1);
      x3    = 16'($urandom);
      base3 = b;
      pos3  = 3'(p);
      iv3   = 1'b1;
      @(posedge clk); #2;
      iv3 = 1'b0;
      repeat (2) begin @(posedge clk); #2; check(!ov3, "small: early out_valid"); end
      @(posedge clk); #2;
      check(ov3, "small: out_valid after 4 cycles");
      for (int j = 0; j < 8; j++) begin
        int c, d;
        c = int'(b) | (j << p);
        d = int'(x3) - c * c;
        check(cand3[j] == 8'(c), "small: cand");
        check(neg3[j] == (d < 0), "small: neg");
        check(rem3[j] == 16'(d), "small: rem");
      end
      @(posedge clk); #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
