// tx_encoder: handshaking and address encoding of the interface transmitter.
//
// Sits between the root of the arbitration tree and the AER OUT channel.
// When the tree raises root_req, the one-hot 'grant' names the winning
// neural unit. This block encodes it into the AER word {core, neural unit}:
// leaf j is unit j mod N_NEURONS of core j / N_NEURONS. It latches the word
// in an intermediate latching stage and returns the token to the tree
// (root_ack). The latched word is then offered on aer_req/aer_addr. The
// tree, and through it the next neural unit, is released while the slow
// interchip handshake (pads, board wiring) is still in progress.
//
// Both channels are four-phase bundled data: aer_addr is stable while
// aer_req is high and until aer_ack rises. The field order of the AER word
// is this implementation's choice.
//
// Circuit warning: root_ack feeds back through the arbitration tree to
// root_req. That loop is the four-phase handshake with the tree.
module tx_encoder #(
  parameter int N_CORES   = snn_aer_pkg::N_CORES,
  parameter int N_NEURONS = snn_aer_pkg::N_NEURONS
) (
  input  logic                         rst_n,
  input  logic                         root_req,
  output logic                         root_ack,
  input  logic [N_CORES*N_NEURONS-1:0] grant,
  output logic                         aer_req,
  input  logic                         aer_ack,
  output logic [$clog2(N_CORES)+$clog2(N_NEURONS)-1:0] aer_addr
);
  localparam int CW = $clog2(N_CORES);
  localparam int NW = $clog2(N_NEURONS);
  localparam int AW = CW + NW;
  localparam int NL = N_CORES * N_NEURONS;

  logic [AW-1:0] enc;

  // OR-encoder: every granted leaf contributes its constant address.
  always_comb begin
    enc = '0;
    for (int j = 0; j < NL; j++) begin
      if (grant[j]) enc |= {CW'(j / N_NEURONS), NW'(j % N_NEURONS)};
    end
  end

  il_stage #(.W(AW)) u_latch (
    .rst_n,
    .l_req(root_req), .l_ack(root_ack), .l_data(enc),
    .r_req(aer_req),  .r_ack(aer_ack),  .r_data(aer_addr)
  );
endmodule
