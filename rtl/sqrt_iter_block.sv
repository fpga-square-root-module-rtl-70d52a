// sqrt_iter_block: candidate roots, squarers and remainders of one iteration.
//
// The current approximate root `base` has its bits below pos+BLOCK_BITS at
// zero. The block writes every one of the 2^BLOCK_BITS values j into bits
// [pos+BLOCK_BITS-1:pos] to form the candidates Q'_j = base | (j << pos),
// squares all of them in parallel with 2^BLOCK_BITS multipliers and
// subtracts each square from the radicand x, giving R_j = x - Q'_j^2 together
// with a flag that R_j is negative (the candidate is too large). Forming,
// squaring and subtracting all candidates at once is the source design's
// iterative block; the pipelining is this implementation's choice.
//
// Timing: a four-stage pipeline, valid-qualified.
//   edge 1  candidates registered (cand holds them until the next in_valid)
//   edge 2  squares computed (multiplier input stage)
//   edge 3  squares registered (multiplier output stage)
//   edge 4  remainders registered, out_valid high for one cycle
// x, base and pos are sampled with in_valid (x also at edge 4, so it must be
// held stable for the whole iteration, as the controller does).
module sqrt_iter_block #(
  parameter int unsigned IN_WIDTH   = 32,     // radicand width (2n)
  parameter int unsigned BLOCK_BITS = 2,      // root bits found per iteration (p)
  localparam int unsigned N       = IN_WIDTH / 2,
  localparam int unsigned NCAND   = 2 ** BLOCK_BITS,
  localparam int unsigned POS_W   = $clog2(N)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [IN_WIDTH-1:0]               x,
  input  logic [N-1:0]                      base,
  input  logic [POS_W-1:0]                  pos,
  output logic                              out_valid,
  output logic [NCAND-1:0][N-1:0]           cand,
  output logic [NCAND-1:0]                  rem_neg,
  output logic [NCAND-1:0][IN_WIDTH-1:0]    rem
);

  logic [NCAND-1:0][IN_WIDTH-1:0] sq_a, sq_b;
  logic [4:1] vld;   // vld[k]: stage k holds valid data

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:1], in_valid};
  end
  assign out_valid = vld[4];

  // Candidate roots.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int j = 0; j < NCAND; j++) cand[j] <= base | (N'(j) << pos);
    end
  end

  // Two-stage multipliers.
  always_ff @(posedge clk) begin
    if (vld[1]) begin
      for (int j = 0; j < NCAND; j++) sq_a[j] <= IN_WIDTH'(cand[j]) * IN_WIDTH'(cand[j]);
    end
    if (vld[2]) sq_b <= sq_a;
  end

  // Remainders with sign.
  always_ff @(posedge clk) begin
    if (vld[3]) begin
      for (int j = 0; j < NCAND; j++) {rem_neg[j], rem[j]} <= {1'b0, x} - {1'b0, sq_b[j]};
    end
  end

endmodule
