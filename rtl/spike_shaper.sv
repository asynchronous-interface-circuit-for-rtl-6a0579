// spike_shaper: spike shaping in front of one SNN core's spike buffers.
//
// It receives a request from the distribution block together with the
// spike-buffer address (local_addr), decodes the address and drives a
// spike pulse onto the one target buffer. The rising edge of the pulse
// follows req. The falling edge is set by buf_ack: the spike buffer, or a
// delay line matched to the synapse's needs, reports that the pulse has
// been long enough. The pulse width is thus set by the analog side and
// not by the arrival time of the digital request. This is how this
// implementation realises "modifying the spike width"; the published
// shaping circuit is not described gate by gate.
//
// Handshakes:
//   distribution side: req+ ack+ req- ack-     (ack = C(req, done))
//   buffer side      : spike+ buf_ack+ spike- buf_ack-
// spike[i] = req & ~ack & (local_addr == i). The pulse therefore ends when
// ack rises, and ack can fall only after buf_ack has returned to zero. An
// address beyond N_BUFFERS produces no pulse and is acknowledged directly.
module spike_shaper #(
  parameter int N_BUFFERS = snn_aer_pkg::N_BUFFERS,
  parameter int BUF_W     = snn_aer_pkg::BUF_W
) (
  input  logic                 rst_n,
  input  logic                 req,
  output logic                 ack,
  input  logic [BUF_W-1:0]     local_addr,
  output logic [N_BUFFERS-1:0] spike,
  input  logic                 buf_ack
);
  logic bad_addr, done;

  assign bad_addr = req && (int'(local_addr) >= N_BUFFERS);
  assign done     = buf_ack | bad_addr;

  c_element u_c (.rst_n, .a(req), .b(done), .c(ack));

  always_comb begin
    for (int i = 0; i < N_BUFFERS; i++)
      spike[i] = req && !ack && (int'(local_addr) == i);
  end

  always_comb if (rst_n) a_onehot: assert ($onehot0(spike));
endmodule
