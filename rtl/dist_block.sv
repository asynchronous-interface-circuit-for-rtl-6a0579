// dist_block: distribution block (fork function) of the interface receiver.
//
// It takes encoded addresses from the AER IN channel and forwards each one
// to one of N_CORES SNN cores. Its three parts:
//   handshaking   : acknowledges aer_req as soon as the address is latched,
//                   not after the spike has been delivered;
//   address latch : an intermediate latching stage (il_stage) that holds
//                   the address while the core side is busy;
//   core decoder  : level 1 of the delivery tree. The top CORE_W bits of the
//                   latched address pick the core whose core_req is raised.
//                   The low BUF_W bits go to every core on local_addr.
// The core-side acknowledges are OR-ed to complete the latch's right-hand
// handshake. An address naming a core that does not exist (only possible
// when N_CORES is not a power of two) is acknowledged and dropped.
//
// Channels: AER IN is four-phase bundled data (aer_addr stable while
// aer_req is high). Each core channel is four-phase: core_req[i]+
// core_ack[i]+ core_req[i]- core_ack[i]-. local_addr is valid while
// core_req is high. The AER word layout {core, spike buffer} is this
// implementation's choice.
//
// Circuit warning: the acknowledge from the cores closes a loop through the
// latch controller (lat_ack -> full -> core_req -> core_ack). That loop is
// the handshake itself.
module dist_block #(
  parameter int N_CORES = snn_aer_pkg::N_CORES,
  parameter int BUF_W   = snn_aer_pkg::BUF_W
) (
  input  logic                               rst_n,
  input  logic                               aer_req,
  output logic                               aer_ack,
  input  logic [$clog2(N_CORES)+BUF_W-1:0]   aer_addr,
  output logic [N_CORES-1:0]                 core_req,
  input  logic [N_CORES-1:0]                 core_ack,
  output logic [BUF_W-1:0]                   local_addr
);
  localparam int CW = $clog2(N_CORES);
  localparam int AW = CW + BUF_W;

  logic          lat_req, lat_ack, bad_core;
  logic [AW-1:0] lat_addr;

  il_stage #(.W(AW)) u_latch (
    .rst_n,
    .l_req(aer_req), .l_ack(aer_ack), .l_data(aer_addr),
    .r_req(lat_req), .r_ack(lat_ack), .r_data(lat_addr)
  );

  always_comb begin
    for (int i = 0; i < N_CORES; i++)
      core_req[i] = lat_req && (lat_addr[AW-1:BUF_W] == CW'(i));
  end

  assign bad_core   = lat_req && (int'(lat_addr[AW-1:BUF_W]) >= N_CORES);
  assign lat_ack    = (|core_ack) | bad_core;
  assign local_addr = lat_addr[BUF_W-1:0];
endmodule
