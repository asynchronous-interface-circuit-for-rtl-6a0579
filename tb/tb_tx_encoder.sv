// tb_tx_encoder: checks address encoding, latching and token return.
// A model of the arbitration tree raises root_req with a one-hot grant for
// a random neural unit; a slow model of the interchip receiver takes the
// AER words. Checked: each word is {core, unit} = {j / 20, j % 20} of the
// granted leaf, words arrive in order and unchanged, the token is returned
// (root_ack) within one time unit whenever the latch is empty - also while
// the AER OUT handshake of the previous word is still open - and not
// while the latch is full.
module tb_tx_encoder;
  localparam int NC = 4, NN = 20, NL = NC * NN, AW = 7;
  logic rst_n = 1'b0;
  logic          root_req, root_ack, aer_req, aer_ack;
  logic [NL-1:0] grant;
  logic [AW-1:0] aer_addr;
  int checks = 0, failures = 0;
  int fast_return = 0, held = 0, n_recv = 0;
  logic [AW-1:0] expq[$];

  tx_encoder dut (.rst_n, .root_req, .root_ack, .grant, .aer_req, .aer_ack, .aer_addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Slow interchip receiver.
  initial begin
    aer_ack = 0;
    forever begin
      wait (rst_n && aer_req);
      #($urandom_range(40, 10));
      check(expq.size() > 0, "unexpected word");
      if (expq.size() > 0) check(aer_addr == expq.pop_front(), "wrong address");
      n_recv++;
      aer_ack = 1;
      wait (!aer_req);
      #($urandom_range(10, 1)) aer_ack = 0;
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
    rst_n = 0; root_req = 0; grant = '0;
    #2 rst_n = 1;
    #2;
    for (int i = 0; i < 400; i++) begin
      int j;
      bit was_empty;
      j = $urandom_range(NL - 1, 0);
      #($urandom_range(10, 1));
      grant = '0;
      grant[j] = 1'b1;
      was_empty = !aer_req && !aer_ack;
      root_req = 1;
      #1;
      if (was_empty) begin
        check(root_ack, "token not returned at once with empty latch");
        fast_return++;
      end else if (!root_ack) begin
        held++;
      end
      wait (root_ack);
      expq.push_back({2'(j / NN), 5'(j % NN)});
      #($urandom_range(4, 1));
      root_req = 0;
      grant = '0;
      wait (!root_ack);
    end
    wait (n_recv == 400);
    #20;
    check(expq.size() == 0, "words left over");
    check(fast_return > 0 && held > 0, "both the fast and the held case must occur");
    $display("fast=%0d held=%0d", fast_return, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
