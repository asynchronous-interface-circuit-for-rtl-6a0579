// tb_arb_tree: checks the arbitration block at its full size (80 leaves).
// Every leaf (one neural unit) fires K spikes with random gaps. A model of
// the transmitter answers at the root with random delays. Checked at each
// root request: 'grant' is one-hot and names a leaf that has a latched,
// not yet served spike. At the end every leaf is served exactly K times.
// Counted and required: root requests that found several leaves waiting
// (contention), and neural-unit acknowledges given while the root channel
// was busy with another spike (the intermediate latches decoupling the
// units from the channel).
module tb_arb_tree;
  localparam int N = 80;
  localparam int K = 6;
  logic rst_n = 1'b0;
  logic         root_req, root_ack;
  logic [N-1:0] leaf_req, leaf_ack, grant;
  int checks = 0, failures = 0;
  int acked[N], served[N];
  int contention = 0, decoupled = 0, root_cycles = 0;
  bit root_busy = 0;

  arb_tree dut (.rst_n, .leaf_req, .leaf_ack, .root_req, .root_ack, .grant);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int waiting();
    int w = 0;
    for (int j = 0; j < N; j++) if (acked[j] > served[j]) w++;
    return w;
  endfunction

  initial begin
    root_ack = 0;
    forever begin
      wait (rst_n && root_req);
      root_busy = 1;
      #($urandom_range(20, 2));
      check($onehot(grant), "grant not one-hot");
      for (int j = 0; j < N; j++) begin
        if (grant[j]) begin
          check(acked[j] > served[j], "granted leaf has no latched spike");
          served[j]++;
        end
      end
      if (waiting() > 0) contention++;
      root_cycles++;
      root_ack = 1;
      wait (!root_req);
      #($urandom_range(10, 1)) root_ack = 0;
      root_busy = 0;
    end
  end

  bit go = 0;
  int leaves_done = 0;

  for (genvar j = 0; j < N; j++) begin : g_leaf
    initial begin
      wait (go);
      repeat (K) begin
        #($urandom_range(60, 1)) leaf_req[j] = 1;
        wait (leaf_ack[j]);
        acked[j]++;
        if (root_busy) decoupled++;
        #($urandom_range(3, 1)) leaf_req[j] = 0;
        wait (!leaf_ack[j]);
      end
      leaves_done++;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; leaf_req = '0;
    for (int j = 0; j < N; j++) begin acked[j] = 0; served[j] = 0; end
    #2 rst_n = 1;
    #2;
    go = 1;
    wait (leaves_done == N);
    wait (root_cycles == N * K);
    #40;
    for (int j = 0; j < N; j++) check(served[j] == K, "leaf not served K times");
    check(root_cycles == N * K, "root cycle count");
    check(contention > 0, "no contention at the root");
    check(decoupled > 0, "no unit acknowledged while the channel was busy");
    $display("contention=%0d decoupled=%0d", contention, decoupled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
