// tb_sqrt_rom: checks every entry of the initial-approximation table.
//
// Each entry must be the largest r with r*r <= index, found here by a plain
// upward search. The read must take exactly one cycle and the output must
// hold while en is low. Run at the default 8-bit index and, through a second
// instance, at 12 bits, the largest table size the design is specified for.
module tb_sqrt_rom;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        en8, en12;
  logic [7:0]  a8;
  logic [11:0] a12;
  logic [3:0]  d8;
  logic [5:0]  d12;

  sqrt_rom                   u8  (.clk, .en(en8),  .addr(a8),  .data(d8));
  sqrt_rom #(.ROM_BITS(12))  u12 (.clk, .en(en12), .addr(a12), .data(d12));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int search_root(input int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] held;
    en8 = 1'b0; en12 = 1'b0; a8 = '0; a12 = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      en8 = 1'b1; a8 = 8'(i);
      @(posedge clk); #1;
      check(int'(d8) == search_root(i), $sformatf("rom8[%0d]=%0d", i, d8));
    end
    // Output holds with en low, even though the address changes.
    held = d8;
    en8 = 1'b0; a8 = 8'd3;
    repeat (3) begin @(posedge clk); #1; check(d8 == held, "hold with en low"); end
    // One-cycle latency: new address is visible only after the edge.
    en8 = 1'b1; a8 = 8'd100;
    #2 check(d8 == held, "no combinational read");
    @(posedge clk); #1 check(d8 == 4'd10, "registered read of 100");
    for (int i = 0; i < 4096; i++) begin
      en12 = 1'b1; a12 = 12'(i);
      @(posedge clk); #1;
      check(int'(d12) == search_root(i), $sformatf("rom12[%0d]=%0d", i, d12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
