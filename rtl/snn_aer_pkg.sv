// snn_aer_pkg: sizes shared by the asynchronous AER interface of the
// four-core spiking neural network chip.
//
// The chip has four SNN cores, each with 100 input spike buffers and 20
// output neural units (the core counts are the design's published numbers).
// The address widths are derived from them: an outgoing AER word is
// {core, neural unit}, an incoming AER word is {core, spike buffer}.
// The field layout of both words is this implementation's choice.
package snn_aer_pkg;
  localparam int N_CORES   = 4;    // SNN cores on the chip
  localparam int N_NEURONS = 20;   // output neural units per core
  localparam int N_BUFFERS = 100;  // input spike buffers per core

  localparam int CORE_W   = $clog2(N_CORES);
  localparam int NEURON_W = $clog2(N_NEURONS);
  localparam int BUF_W    = $clog2(N_BUFFERS);
endpackage
