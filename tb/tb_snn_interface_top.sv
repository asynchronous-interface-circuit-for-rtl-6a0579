// tb_snn_interface_top: end-to-end test of the whole interface at its
// default size (4 cores, 20 neural units and 100 spike buffers per core).
//
// Receive direction: a transmitter model sends NR random {core, buffer}
// words on AER IN; a spike-buffer model per core acknowledges each pulse
// after a random width. Every word must give exactly one pulse, on the
// addressed buffer of the addressed core, in order; words for a buffer
// number beyond the last one are dropped without a pulse.
// Transmit direction: each of the 80 neural units fires K spikes about
// every 10 time units; the AER OUT receiver takes about 40 time units per
// word (a slow interchip link). Every word on AER OUT must name a unit
// with a latched, not yet sent spike, and every unit must be sent K times.
// Both directions run at the same time.
//
// The mechanisms of the design are counted, and each must occur:
//   tx_contention  AER OUT word sent while other units were waiting
//   tx_decoupled   unit acknowledged while the AER OUT handshake was open
//   tx_backpress   unit's request waited because its latch was still full
//   tx_fast_busy   unit with an empty latch released within one time unit
//                  while AER OUT was busy (checked for every such request)
//   rx_decoupled   AER IN acknowledged while a spike pulse was still on
//   rx_backpress   AER IN acknowledge held back by a full address latch
//   rx_dropped     word for a nonexistent buffer dropped
//   cores          every core received a pulse and sent a word
module tb_snn_interface_top;
  import snn_aer_pkg::*;
  localparam int NC = N_CORES, NN = N_NEURONS, NB = N_BUFFERS;
  localparam int NL = NC * NN;
  localparam int BW = $clog2(NB);
  localparam int RAW = $clog2(NC) + BW;
  localparam int TAW = $clog2(NC) + $clog2(NN);
  localparam int NR = 600;   // words sent on AER IN
  localparam int K  = 5;     // spikes per neural unit

  logic rst_n = 1'b0;
  logic                         aer_in_req, aer_in_ack;
  logic [RAW-1:0]               aer_in_addr;
  logic [NC-1:0][NB-1:0]        spike;
  logic [NC-1:0]                spike_ack;
  logic [NC-1:0][NN-1:0]        nu_req, nu_ack;
  logic                         aer_out_req, aer_out_ack;
  logic [TAW-1:0]               aer_out_addr;

  snn_interface_top dut (
    .rst_n,
    .aer_in_req, .aer_in_ack, .aer_in_addr,
    .spike, .spike_ack,
    .nu_req, .nu_ack,
    .aer_out_req, .aer_out_ack, .aer_out_addr
  );

  int checks = 0, failures = 0;
  int tx_contention = 0, tx_decoupled = 0, tx_backpress = 0, tx_fast_busy = 0;
  int rx_decoupled = 0, rx_backpress = 0, rx_dropped = 0;
  int rx_pulses = 0, tx_words = 0, overlap = 0;
  int core_rx[NC], core_tx[NC];
  int acked[NL], sent[NL];
  logic [RAW-1:0] rxq[$];
  bit go = 0;
  int units_done = 0;
  bit rx_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int unit_waiting();
    int w = 0;
    for (int j = 0; j < NL; j++) if (acked[j] > sent[j]) w++;
    return w;
  endfunction

  // ---------------- receive direction ----------------
  for (genvar c = 0; c < NC; c++) begin : g_buf
    initial begin
      spike_ack[c] = 1'b0;
      forever begin
        wait (rst_n && (|spike[c]));
        check($onehot(spike[c]), "several buffers pulsed");
        check(rxq.size() > 0, "pulse that was not sent");
        if (rxq.size() > 0) begin
          logic [RAW-1:0] e;
          e = rxq.pop_front();
          check(int'(e[RAW-1:BW]) == c, "pulse on wrong core");
          check(spike[c][e[BW-1:0]], "pulse on wrong buffer");
        end
        core_rx[c]++;
        rx_pulses++;
        if (aer_out_req) overlap++;
        #($urandom_range(6, 2)) spike_ack[c] = 1'b1;
        wait (!(|spike[c]));
        #($urandom_range(3, 1)) spike_ack[c] = 1'b0;
      end
    end
  end

  initial begin
    aer_in_req = 0; aer_in_addr = '0;
    wait (go);
    for (int i = 0; i < NR; i++) begin
      logic [RAW-1:0] w;
      w = RAW'($urandom);
      #($urandom_range(4, 1));
      aer_in_addr = w;
      // Expected pulses are queued before the request: the pulse can
      // follow the request within the same time step.
      if (int'(w[BW-1:0]) < NB) rxq.push_back(w);
      else rx_dropped++;
      aer_in_req = 1;
      #1;
      if (!aer_in_ack) rx_backpress++;
      else if (|spike) rx_decoupled++;
      wait (aer_in_ack);
      #($urandom_range(2, 1)) aer_in_req = 0;
      wait (!aer_in_ack);
    end
    rx_done = 1;
  end

  // ---------------- transmit direction ----------------
  initial begin
    aer_out_ack = 0;
    forever begin
      wait (rst_n && aer_out_req);
      #($urandom_range(45, 35));
      begin
        int j;
        j = int'(aer_out_addr[TAW-1:$clog2(NN)]) * NN + int'(aer_out_addr[$clog2(NN)-1:0]);
        check(int'(aer_out_addr[$clog2(NN)-1:0]) < NN, "unit field out of range");
        check(j < NL && acked[j] > sent[j], "word names a unit with no pending spike");
        if (j < NL) begin
          sent[j]++;
          core_tx[j / NN]++;
        end
      end
      if (unit_waiting() > 0) tx_contention++;
      tx_words++;
      aer_out_ack = 1;
      wait (!aer_out_req);
      #($urandom_range(8, 2)) aer_out_ack = 0;
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_core
    for (genvar n = 0; n < NN; n++) begin : g_unit
      initial begin
        bit latch_free;
        nu_req[c][n] = 1'b0;
        wait (go);
        repeat (K) begin
          #($urandom_range(14, 6));
          // The unit's own latch is empty once its previous spike was sent
          // (sent is updated when the receiver takes the word, after the
          // latch emptied).
          latch_free = (acked[c*NN+n] == sent[c*NN+n]);
          nu_req[c][n] = 1'b1;
          #1;
          if (latch_free) begin
            check(nu_ack[c][n], "unit with an empty latch not released at once");
            if (aer_out_req) tx_fast_busy++;
          end
          if (!nu_ack[c][n]) tx_backpress++;
          wait (nu_ack[c][n]);
          acked[c*NN+n]++;
          if (aer_out_req) tx_decoupled++;
          #1 nu_req[c][n] = 1'b0;
          wait (!nu_ack[c][n]);
        end
        units_done++;
      end
    end
  end

  // ---------------- control ----------------
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: rx %0d/%0d tx %0d/%0d", rx_pulses + rx_dropped, NR, tx_words, NL * K);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NL; j++) begin acked[j] = 0; sent[j] = 0; end
    for (int c = 0; c < NC; c++) begin core_rx[c] = 0; core_tx[c] = 0; end
    #3 rst_n = 1'b1;
    #3 go = 1;
    wait (rx_done && units_done == NL);
    wait (tx_words == NL * K && rxq.size() == 0);
    #100;
    check(rx_pulses + rx_dropped == NR, "receive word count");
    for (int j = 0; j < NL; j++) check(sent[j] == K, "unit not sent K times");
    for (int c = 0; c < NC; c++) check(core_rx[c] > 0 && core_tx[c] > 0, "core idle in one direction");
    check(!aer_in_ack && !aer_out_req && spike == '0 && nu_ack == '0, "interface not idle at the end");
    $display("tx_contention=%0d tx_decoupled=%0d tx_backpress=%0d tx_fast_busy=%0d", tx_contention, tx_decoupled, tx_backpress, tx_fast_busy);
    $display("rx_decoupled=%0d rx_backpress=%0d rx_dropped=%0d overlap=%0d", rx_decoupled, rx_backpress, rx_dropped, overlap);
    check(tx_contention > 0, "tx contention never happened");
    check(tx_decoupled > 0, "tx decoupling never happened");
    check(tx_fast_busy > 0, "no unit was released at once while AER OUT was busy");
    check(tx_backpress > 0, "tx back-pressure never happened");
    check(rx_decoupled > 0, "rx decoupling never happened");
    check(rx_backpress > 0, "rx back-pressure never happened");
    check(rx_dropped > 0, "rx drop never happened");
    check(overlap > 0, "the two directions never overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
