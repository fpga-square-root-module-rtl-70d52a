// sqrt_cmp_tree: pipelined comparison tree that picks the minimal remainder.
//
// The 2^BLOCK_BITS remainders of one iteration enter as leaves. Each tree
// node compares its two children and keeps the better one: a non-negative
// remainder always beats a negative one (that candidate's square exceeds the
// radicand), and of two non-negative remainders the smaller wins. The winner
// carries its candidate index up the tree. Since the candidates grow with
// their index, the winner is the largest candidate whose square does not
// exceed the radicand, i.e. the correct next root bits. The tree has
// BLOCK_BITS levels, as in the source design's pairwise comparison loop; the
// rule that negative remainders lose is this implementation's reading of
// "minimal remainder".
//
// Timing: every level is registered, so out_valid and the result follow
// in_valid by BLOCK_BITS cycles; a new set of remainders may enter every
// cycle. Nodes are stored heap-ordered: node 0 is the root, the children of
// node k are 2k+1 and 2k+2, and indices from NCAND-1 upward are the leaves.
module sqrt_cmp_tree #(
  parameter int unsigned IN_WIDTH   = 32,
  parameter int unsigned BLOCK_BITS = 2,
  localparam int unsigned NCAND = 2 ** BLOCK_BITS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [NCAND-1:0]                rem_neg,
  input  logic [NCAND-1:0][IN_WIDTH-1:0]  rem,
  output logic                            out_valid,
  output logic [BLOCK_BITS-1:0]           min_idx,
  output logic [IN_WIDTH-1:0]             min_rem,
  output logic                            min_neg
);

  typedef struct packed {
    logic                  neg;
    logic [IN_WIDTH-1:0]   rem;
    logic [BLOCK_BITS-1:0] idx;
  } node_t;

  function automatic node_t pick(input node_t a, input node_t b);
    if (a.neg != b.neg) return a.neg ? b : a;
    return (b.rem < a.rem) ? b : a;
  endfunction

  node_t leaf [NCAND];
  node_t node [NCAND-1];

  always_comb begin
    for (int j = 0; j < NCAND; j++) begin
      leaf[j].neg = rem_neg[j];
      leaf[j].rem = rem[j];
      leaf[j].idx = BLOCK_BITS'(j);
    end
  end

  for (genvar k = 0; k < NCAND - 1; k++) begin : g_node
    node_t lc, rc;
    if (2 * k + 1 >= NCAND - 1) begin : g_leaves
      assign lc = leaf[2 * k + 1 - (NCAND - 1)];
      assign rc = leaf[2 * k + 2 - (NCAND - 1)];
    end else begin : g_inner
      assign lc = node[2 * k + 1];
      assign rc = node[2 * k + 2];
    end
    always_ff @(posedge clk) node[k] <= pick(lc, rc);
  end

  logic [BLOCK_BITS:1] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= BLOCK_BITS'({vld, in_valid});
  end

  assign out_valid = vld[BLOCK_BITS];
  assign min_idx   = node[0].idx;
  assign min_rem   = node[0].rem;
  assign min_neg   = node[0].neg;

endmodule
