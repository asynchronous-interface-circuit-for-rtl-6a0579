// snn_interface_top: asynchronous AER interface of the four-core SNN chip.
//
// The chip joins N_CORES analog SNN cores to the outside world over two
// four-phase address-event (AER) channels. No clock is used anywhere.
//   Interface Rx: AER IN -> dist_block (handshake, intermediate address
//     latch, core decoder) -> one spike_shaper per core -> spike pulses to
//     the core's N_BUFFERS spike buffers (spike/spike_ack).
//   Interface Tx: the N_CORES x N_NEURONS neural units raise requests
//     (nu_req/nu_ack) -> arb_tree (one intermediate latch per unit, tree of
//     unit arbiters) -> tx_encoder (address encoding, intermediate latch,
//     token return) -> AER OUT.
// Both directions are built on the intermediate latching template. Each
// stage acknowledges its sender as soon as it has latched the token, so a
// slow channel (the interchip pads) does not hold up the neural units or
// the sender on AER IN.
//
// The SNN cores themselves are analog and outside this RTL. Their spike
// buffer inputs and neural-unit outputs are the ports below.
//
// Ports (all four-phase, bundled data where an address is carried):
//   aer_in_req/aer_in_ack/aer_in_addr    incoming {core, spike buffer}
//   spike[c][b] / spike_ack[c]           pulse to buffer b of core c; the
//                                        core acknowledges to end the pulse
//   nu_req[c][n] / nu_ack[c][n]          neural unit n of core c fired
//   aer_out_req/aer_out_ack/aer_out_addr outgoing {core, neural unit}
// rst_n is an active-low reset that puts every handshake at zero.
//
// Circuit warning: the latches and the loops through aer_in_ack and
// root_ack belong to the self-timed handshakes of the blocks below.
module snn_interface_top #(
  parameter int N_CORES   = snn_aer_pkg::N_CORES,
  parameter int N_NEURONS = snn_aer_pkg::N_NEURONS,
  parameter int N_BUFFERS = snn_aer_pkg::N_BUFFERS
) (
  input  logic                                       rst_n,
  // AER IN (from the transmitting chip)
  input  logic                                       aer_in_req,
  output logic                                       aer_in_ack,
  input  logic [$clog2(N_CORES)+$clog2(N_BUFFERS)-1:0] aer_in_addr,
  // spike buffers of the SNN cores
  output logic [N_CORES-1:0][N_BUFFERS-1:0]          spike,
  input  logic [N_CORES-1:0]                         spike_ack,
  // neural units of the SNN cores
  input  logic [N_CORES-1:0][N_NEURONS-1:0]          nu_req,
  output logic [N_CORES-1:0][N_NEURONS-1:0]          nu_ack,
  // AER OUT (to the receiving chip)
  output logic                                       aer_out_req,
  input  logic                                       aer_out_ack,
  output logic [$clog2(N_CORES)+$clog2(N_NEURONS)-1:0] aer_out_addr
);
  localparam int BUF_W = $clog2(N_BUFFERS);
  localparam int NL    = N_CORES * N_NEURONS;

  // ---------------- Interface Rx ----------------
  logic [N_CORES-1:0] core_req, core_ack;
  logic [BUF_W-1:0]   local_addr;

  dist_block #(.N_CORES(N_CORES), .BUF_W(BUF_W)) u_dist (
    .rst_n,
    .aer_req(aer_in_req), .aer_ack(aer_in_ack), .aer_addr(aer_in_addr),
    .core_req, .core_ack, .local_addr
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    spike_shaper #(.N_BUFFERS(N_BUFFERS), .BUF_W(BUF_W)) u_shape (
      .rst_n,
      .req(core_req[c]), .ack(core_ack[c]), .local_addr,
      .spike(spike[c]), .buf_ack(spike_ack[c])
    );
  end

  // ---------------- Interface Tx ----------------
  logic          root_req, root_ack;
  logic [NL-1:0] grant;

  arb_tree #(.N_LEAVES(NL)) u_arb (
    .rst_n,
    .leaf_req(nu_req), .leaf_ack(nu_ack),
    .root_req, .root_ack, .grant
  );

  tx_encoder #(.N_CORES(N_CORES), .N_NEURONS(N_NEURONS)) u_tx (
    .rst_n,
    .root_req, .root_ack, .grant,
    .aer_req(aer_out_req), .aer_ack(aer_out_ack), .aer_addr(aer_out_addr)
  );
endmodule
