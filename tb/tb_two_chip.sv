// tb_two_chip: two chips chained as two network layers, all at full size.
//
// Chip A is layer 1 and chip B is layer 2. A spike source (standing in for
// the board's FPGA) sends NS random {core, buffer} words to chip A's AER
// IN. For every pulse on buffer b of core c of chip A, a stand-in for the
// analog core fires neural unit (c, b mod 20) once; the stand-in does no
// neural computation. Chip A's AER OUT feeds a router model. The router
// forwards the word {core, unit} to chip B's AER IN as {core, buffer = unit}.
// A spike-buffer model on chip B counts the pulses it receives.
//
// Checked: chip B's pulse count on each (core, buffer) equals the number
// of spikes sent to the matching neural unit of chip A. Every spike thus
// crosses both interfaces exactly once, through the join (arbitration) of
// chip A and the fork (distribution) of chip B.
module tb_two_chip;
  import snn_aer_pkg::*;
  localparam int NC = N_CORES, NN = N_NEURONS, NB = N_BUFFERS;
  localparam int NL = NC * NN;
  localparam int BW = $clog2(NB);
  localparam int NW = $clog2(NN);
  localparam int RAW = $clog2(NC) + BW;
  localparam int TAW = $clog2(NC) + NW;
  localparam int NS = 400;

  logic rst_n = 1'b0;
  // chip A
  logic                  a_in_req, a_in_ack, a_out_req, a_out_ack;
  logic [RAW-1:0]        a_in_addr;
  logic [TAW-1:0]        a_out_addr;
  logic [NC-1:0][NB-1:0] a_spike;
  logic [NC-1:0]         a_spike_ack;
  logic [NC-1:0][NN-1:0] a_nu_req, a_nu_ack;
  // chip B
  logic                  b_in_req, b_in_ack, b_out_req;
  logic [RAW-1:0]        b_in_addr;
  logic [TAW-1:0]        b_out_addr;
  logic [NC-1:0][NB-1:0] b_spike;
  logic [NC-1:0]         b_spike_ack;
  logic [NC-1:0][NN-1:0] b_nu_ack;

  snn_interface_top chip_a (
    .rst_n,
    .aer_in_req(a_in_req), .aer_in_ack(a_in_ack), .aer_in_addr(a_in_addr),
    .spike(a_spike), .spike_ack(a_spike_ack),
    .nu_req(a_nu_req), .nu_ack(a_nu_ack),
    .aer_out_req(a_out_req), .aer_out_ack(a_out_ack), .aer_out_addr(a_out_addr)
  );

  snn_interface_top chip_b (
    .rst_n,
    .aer_in_req(b_in_req), .aer_in_ack(b_in_ack), .aer_in_addr(b_in_addr),
    .spike(b_spike), .spike_ack(b_spike_ack),
    .nu_req('0), .nu_ack(b_nu_ack),
    .aer_out_req(b_out_req), .aer_out_ack(1'b0), .aer_out_addr(b_out_addr)
  );

  int checks = 0, failures = 0;
  int fire_cnt[NL];     // spikes sent to each neural unit of chip A
  int pending[NL];      // of those, not yet fired
  int b_cnt[NL];        // pulses seen by chip B on buffer (core, unit)
  int b_other = 0, b_total = 0, routed = 0;
  bit src_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Spike source into chip A.
  initial begin
    a_in_req = 0; a_in_addr = '0;
    wait (rst_n);
    #5;
    for (int i = 0; i < NS; i++) begin
      logic [RAW-1:0] w;
      w = {$clog2(NC)'($urandom), BW'($urandom_range(NB - 1, 0))};
      #($urandom_range(6, 1));
      a_in_addr = w;
      a_in_req = 1;
      wait (a_in_ack);
      #1 a_in_req = 0;
      wait (!a_in_ack);
    end
    src_done = 1;
  end

  // Stand-in cores of chip A: pulse on (c, b) -> fire unit (c, b mod NN).
  for (genvar c = 0; c < NC; c++) begin : g_a_core
    initial begin
      a_spike_ack[c] = 1'b0;
      forever begin
        wait (rst_n && (|a_spike[c]));
        for (int b = 0; b < NB; b++) begin
          if (a_spike[c][b]) begin
            fire_cnt[c*NN + b % NN]++;
            pending[c*NN + b % NN]++;
          end
        end
        #($urandom_range(4, 2)) a_spike_ack[c] = 1'b1;
        wait (!(|a_spike[c]));
        #1 a_spike_ack[c] = 1'b0;
      end
    end
    for (genvar n = 0; n < NN; n++) begin : g_unit
      initial begin
        a_nu_req[c][n] = 1'b0;
        forever begin
          wait (rst_n && pending[c*NN+n] > 0);
          #($urandom_range(5, 1)) a_nu_req[c][n] = 1'b1;
          wait (a_nu_ack[c][n]);
          pending[c*NN+n]--;
          #1 a_nu_req[c][n] = 1'b0;
          wait (!a_nu_ack[c][n]);
        end
      end
    end
  end

  // Router: chip A AER OUT -> chip B AER IN.
  initial begin
    a_out_ack = 0; b_in_req = 0; b_in_addr = '0;
    forever begin
      wait (rst_n && a_out_req);
      #($urandom_range(8, 3));
      b_in_addr = {a_out_addr[TAW-1:NW], BW'(a_out_addr[NW-1:0])};
      b_in_req = 1;
      wait (b_in_ack);
      a_out_ack = 1;
      routed++;
      #($urandom_range(3, 1)) b_in_req = 0;
      wait (!b_in_ack && !a_out_req);
      #($urandom_range(3, 1)) a_out_ack = 0;
    end
  end

  // Spike buffers of chip B.
  for (genvar c = 0; c < NC; c++) begin : g_b_core
    initial begin
      b_spike_ack[c] = 1'b0;
      forever begin
        wait (rst_n && (|b_spike[c]));
        for (int b = 0; b < NB; b++) begin
          if (b_spike[c][b]) begin
            if (b < NN) b_cnt[c*NN + b]++;
            else b_other++;
          end
        end
        b_total++;
        #($urandom_range(4, 2)) b_spike_ack[c] = 1'b1;
        wait (!(|b_spike[c]));
        #1 b_spike_ack[c] = 1'b0;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: routed %0d of %0d", routed, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NL; j++) begin fire_cnt[j] = 0; pending[j] = 0; b_cnt[j] = 0; end
    #3 rst_n = 1'b1;
    wait (src_done && b_total == NS);
    #100;
    for (int j = 0; j < NL; j++) check(b_cnt[j] == fire_cnt[j], "layer-2 pulse count differs from layer-1 firing");
    check(b_other == 0, "layer-2 pulse outside the mapped buffers");
    check(routed == NS, "routed word count");
    check(b_out_req == 1'b0 && b_nu_ack == '0 && b_out_addr == '0, "layer 2 transmitter not idle");
    $display("routed=%0d", routed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
