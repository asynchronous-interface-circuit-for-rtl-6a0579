// tb_dist_block: checks the distribution block (4 cores, 7-bit buffer
// field). A transmitter model sends 600 random {core, buffer} words on
// AER IN; one slow model per core answers core_req. Checked: the request
// goes to the addressed core only, local_addr carries the buffer field,
// every word is delivered once and in order, and AER IN is acknowledged
// as soon as the word is latched, while the previous word may still be
// waiting for its core (counted, must happen). A second instance with
// three cores checks that a word for a missing core is acknowledged and
// dropped.
module tb_dist_block;
  localparam int NC = 4, BW = 7, AW = 9;
  logic rst_n = 1'b0;
  logic          aer_req, aer_ack;
  logic [AW-1:0] aer_addr;
  logic [NC-1:0] core_req, core_ack;
  logic [BW-1:0] local_addr;
  int checks = 0, failures = 0;
  int early_ack = 0, n_recv = 0;
  logic [AW-1:0] expq[$];

  dist_block dut (.rst_n, .aer_req, .aer_ack, .aer_addr, .core_req, .core_ack, .local_addr);

  // Three-core instance for the missing-core case.
  logic          req3, ack3;
  logic [AW-1:0] addr3;
  logic [2:0]    creq3;
  logic [BW-1:0] laddr3;
  dist_block #(.N_CORES(3), .BUF_W(BW)) dut3 (
    .rst_n, .aer_req(req3), .aer_ack(ack3), .aer_addr(addr3),
    .core_req(creq3), .core_ack(3'b000), .local_addr(laddr3)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(core_req) if (rst_n) check($onehot0(core_req), "several cores requested");

  for (genvar c = 0; c < NC; c++) begin : g_core
    initial begin
      core_ack[c] = 0;
      forever begin
        wait (rst_n && core_req[c]);
        #($urandom_range(30, 2));
        check(expq.size() > 0, "unexpected delivery");
        if (expq.size() > 0) begin
          logic [AW-1:0] e;
          e = expq.pop_front();
          check(e[AW-1:BW] == c, "delivered to wrong core");
          check(local_addr == e[BW-1:0], "wrong buffer field");
        end
        n_recv++;
        core_ack[c] = 1;
        wait (!core_req[c]);
        #($urandom_range(5, 1)) core_ack[c] = 0;
      end
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
    rst_n = 0; aer_req = 0; aer_addr = '0; req3 = 0; addr3 = '0;
    #2 rst_n = 1;
    #2;
    // Missing core on the three-core instance.
    addr3 = {2'd3, 7'd5};
    req3 = 1;
    #1 check(ack3, "word for missing core not acknowledged");
    #1 check(creq3 == 3'b000, "word for missing core delivered");
    req3 = 0;
    #1 check(!ack3, "missing-core handshake did not return to zero");
    // Random traffic.
    for (int i = 0; i < 600; i++) begin
      logic [AW-1:0] w;
      w = AW'($urandom);
      #($urandom_range(6, 1));
      aer_addr = w;
      aer_req = 1;
      wait (aer_ack);
      expq.push_back(w);
      if (|core_req) early_ack++;
      #($urandom_range(3, 1)) aer_req = 0;
      wait (!aer_ack);
    end
    wait (n_recv == 600);
    #20;
    check(expq.size() == 0, "words left over");
    check(early_ack > 0, "AER IN never acknowledged ahead of core delivery");
    $display("early_ack=%0d", early_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
