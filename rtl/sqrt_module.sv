// sqrt_module: square root by table look-up and iterative block refinement.
//
// Computes root = floor(sqrt(x)) and remainder = x - root^2 for an unsigned
// IN_WIDTH-bit radicand. The radicand may be read as fixed point with an even
// number of fraction bits F; the root then has F/2 fraction bits (the root of
// 14.0625 = 0xE1 with F = 4 is 3.75 = 0xF with F/2 = 2).
//
// How it works:
//   1. The ROM_BITS most significant bits of x index a look-up table
//      (sqrt_rom) that returns the top ROM_BITS/2 bits of the root.
//   2. Each iteration finds the next BLOCK_BITS root bits at once:
//      sqrt_iter_block forms all 2^BLOCK_BITS candidates by appending every
//      bit pattern to the root found so far, squares them with as many
//      multipliers and subtracts the squares from x; sqrt_cmp_tree picks the
//      candidate with the smallest non-negative remainder, which becomes the
//      new root.
//   3. sqrt_ctrl repeats step 2 until the root's LSB has been found, or stops
//      as soon as the winning remainder is zero, because the root is then
//      exact and all remaining bits are zero.
// This is the source design's algorithm and block structure. The pipeline
// registers, the handshake and the reading of the remainder comparison are
// this implementation's choices.
//
// Interface: pulse start with x while ready is high. x is registered at that
// edge, so it may change afterwards. done pulses for one cycle when root,
// remainder, exact and iterations are valid; they hold until the next start.
// Timing: with k iterations used, done follows the accepted start by
// 1 + k*(5 + BLOCK_BITS) cycles; 7 per iteration with 2-bit blocks. A full
// result takes k = (IN_WIDTH/2 - ROM_BITS/2)/BLOCK_BITS iterations (6, so 43
// cycles, at the defaults), an exact root may take fewer.
module sqrt_module
  import sqrt_pkg::*;
#(
  parameter int unsigned IN_WIDTH   = 32,   // radicand width, even
  parameter int unsigned ROM_BITS   = 8,    // radicand MSBs resolved by the table, even
  parameter int unsigned BLOCK_BITS = 2,    // root bits per iteration
  localparam int unsigned N      = IN_WIDTH / 2,
  localparam int unsigned ITERS  = num_iters(IN_WIDTH, ROM_BITS, BLOCK_BITS),
  localparam int unsigned ITER_W = $clog2(ITERS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [IN_WIDTH-1:0] x,
  output logic                ready,
  output logic                done,
  output logic [N-1:0]        root,
  output logic [N:0]          remainder,
  output logic                exact,
  output logic [ITER_W-1:0]   iterations
);

  localparam int unsigned NCAND  = 2 ** BLOCK_BITS;
  localparam int unsigned POS_W  = $clog2(N);
  localparam int unsigned ROOT_R = ROM_BITS / 2;

  logic                           x_load, rom_en, launch, use_rom, q_load;
  logic [POS_W-1:0]               pos;
  logic [IN_WIDTH-1:0]            x_reg;
  logic [ROOT_R-1:0]              rom_root;
  logic [N-1:0]                   base, q_reg;
  logic                           it_valid;
  logic [NCAND-1:0][N-1:0]        cand;
  logic [NCAND-1:0]               rem_neg;
  logic [NCAND-1:0][IN_WIDTH-1:0] rem;
  logic                           tr_valid, tr_neg;
  logic [BLOCK_BITS-1:0]          tr_idx;
  logic [IN_WIDTH-1:0]            tr_rem;
  logic [N:0]                     rem_reg;

  sqrt_ctrl #(
    .IN_WIDTH(IN_WIDTH), .ROM_BITS(ROM_BITS), .BLOCK_BITS(BLOCK_BITS)
  ) u_ctrl (
    .clk, .rst_n, .start,
    .tree_valid (tr_valid),
    .rem_zero   (tr_rem == '0),
    .ready, .x_load, .rom_en, .launch, .use_rom, .pos, .q_load, .done,
    .iter_count (iterations)
  );

  // Radicand register, held for the whole computation.
  always_ff @(posedge clk) begin
    if (!rst_n)      x_reg <= '0;
    else if (x_load) x_reg <= x;
  end

  sqrt_rom #(.ROM_BITS(ROM_BITS)) u_rom (
    .clk,
    .en   (rom_en),
    .addr (x_reg[IN_WIDTH-1 -: ROM_BITS]),
    .data (rom_root)
  );

  // Root so far: the table's root for the first iteration, then the register.
  assign base = use_rom ? {rom_root, (N - ROOT_R)'(0)} : q_reg;

  sqrt_iter_block #(.IN_WIDTH(IN_WIDTH), .BLOCK_BITS(BLOCK_BITS)) u_iter (
    .clk, .rst_n,
    .in_valid  (launch),
    .x         (x_reg),
    .base,
    .pos,
    .out_valid (it_valid),
    .cand, .rem_neg, .rem
  );

  sqrt_cmp_tree #(.IN_WIDTH(IN_WIDTH), .BLOCK_BITS(BLOCK_BITS)) u_tree (
    .clk, .rst_n,
    .in_valid  (it_valid),
    .rem_neg, .rem,
    .out_valid (tr_valid),
    .min_idx   (tr_idx),
    .min_rem   (tr_rem),
    .min_neg   (tr_neg)
  );

  // Root and remainder registers, updated with the winner of each iteration.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_reg   <= '0;
      rem_reg <= '0;
    end else if (q_load) begin
      q_reg   <= cand[tr_idx];
      rem_reg <= tr_rem[N:0];
    end
  end

  assign root      = q_reg;
  assign remainder = rem_reg;
  assign exact     = (rem_reg == '0);

  // Candidate 0 extends a root whose square does not exceed x, so the
  // winning remainder is never negative.
  a_winner_nonneg: assert property (@(posedge clk) disable iff (!rst_n)
                                    tr_valid |-> !tr_neg);
  // The result is announced as the controller returns to idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> ready);

endmodule
