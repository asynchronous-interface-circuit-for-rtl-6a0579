// arb_tree: arbitration block (join function) of the interface transmitter.
//
// N_LEAVES neural units each fire a four-phase request (leaf_req/leaf_ack).
// Each request enters its own intermediate latching block (il_ctrl). That
// block latches the spike and acknowledges the neural unit at once, so the
// unit can reset and go on computing while its token waits for the shared
// channel. The latched requests compete in a tree of two-input unit
// arbiters. The root request (root_req) asks the transmitter for the
// channel, and the transmitter's acknowledge (root_ack, the token return)
// travels back down the winning path and empties the winner's latch.
//
// The tree is a complete binary tree in heap order: node k (1..N_LEAVES-1)
// has children 2k and 2k+1, and leaf j sits at index N_LEAVES+j. Any
// N_LEAVES >= 2 works. The default, 80, is the 4 cores x 20 neural units
// of the chip. 'grant' is one-hot: bit j is set while leaf j holds every
// mutex on its path to the root. It is stable from root_req+ until
// root_ack+, so the transmitter can encode the address from it.
//
// Circuit warning: the tree is built from latches (mutexes, C-elements and
// leaf stages) joined by request/acknowledge loops, as any self-timed
// arbiter is.
//
// Timing: no clock. A request reaches the root through log2(N_LEAVES)
// arbiter levels. A neural unit's acknowledge depends only on its own latch.
module arb_tree #(
  parameter int N_LEAVES = snn_aer_pkg::N_CORES * snn_aer_pkg::N_NEURONS
) (
  input  logic                rst_n,
  input  logic [N_LEAVES-1:0] leaf_req,
  output logic [N_LEAVES-1:0] leaf_ack,
  output logic                root_req,
  input  logic                root_ack,
  output logic [N_LEAVES-1:0] grant
);
  // Heap-ordered request, acknowledge and path-select nets.
  logic [2*N_LEAVES-1:1] rq, ak, sel;
  logic [N_LEAVES-1:1]   gl, gr;

  for (genvar j = 0; j < N_LEAVES; j++) begin : g_leaf
    il_ctrl u_il (
      .rst_n,
      .l_req(leaf_req[j]), .l_ack(leaf_ack[j]),
      .r_req(rq[N_LEAVES+j]), .r_ack(ak[N_LEAVES+j])
    );
    assign grant[j] = sel[N_LEAVES+j];
  end

  for (genvar k = 1; k < N_LEAVES; k++) begin : g_node
    unit_arbiter u_arb (
      .rst_n,
      .r1(rq[2*k]),   .a1(ak[2*k]),
      .r2(rq[2*k+1]), .a2(ak[2*k+1]),
      .r_out(rq[k]),  .a_in(ak[k]),
      .g1(gl[k]),     .g2(gr[k])
    );
    assign sel[2*k]   = sel[k] & gl[k];
    assign sel[2*k+1] = sel[k] & gr[k];
  end

  assign sel[1]   = 1'b1;
  assign root_req = rq[1];
  assign ak[1]    = root_ack;

  // At most one leaf holds the token.
  always_comb if (rst_n) a_onehot: assert ($onehot0(grant));
endmodule
