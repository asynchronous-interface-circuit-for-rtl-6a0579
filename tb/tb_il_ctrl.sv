// tb_il_ctrl: checks the data-less intermediate latching stage.
// Part 1, right side stalled: a token is acknowledged to the left at once,
// a second token waits while the first is stored (back-pressure), and is
// taken once the right side has completed its handshake.
// Part 2, random delays on both sides: tokens in equal tokens out, and
// the four-phase order holds on both sides.
module tb_il_ctrl;
  logic rst_n = 1'b0;
  logic l_req, l_ack, r_req, r_ack;
  int checks = 0, failures = 0;
  int decoupled = 0;
  int n_sent = 0, n_recv = 0;
  bit rx_auto = 0;

  il_ctrl dut (.rst_n, .l_req, .l_ack, .r_req, .r_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    r_ack = 0;
    forever begin
      wait (rx_auto && r_req);
      #($urandom_range(10, 1));
      n_recv++;
      check(n_recv <= n_sent, "more tokens out than in");
      r_ack = 1;
      wait (!r_req);
      #($urandom_range(10, 1)) r_ack = 0;
    end
  end

  always @(negedge r_req) if (rst_n) check(r_ack, "r_req fell before r_ack");
  always @(negedge l_ack) if (rst_n) check(!l_req, "l_ack fell while l_req high");

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; l_req = 0;
    #2 rst_n = 1;
    #2;
    check(!l_ack && !r_req, "reset state");
    l_req = 1;
    #1 check(l_ack && r_req, "token not latched and acknowledged at once");
    l_req = 0;
    #1 check(!l_ack && r_req, "left did not return to zero independently");
    l_req = 1;
    #20 check(!l_ack, "second token acknowledged while full");
    r_ack = 1;
    #1 check(!r_req && !l_ack, "release order");
    r_ack = 0;
    #1 check(l_ack && r_req, "second token not taken after release");
    l_req = 0;
    r_ack = 1;
    #1 r_ack = 0;
    #1;
    rx_auto = 1;
    for (int i = 0; i < 500; i++) begin
      wait (!l_ack);
      #1 l_req = 1;
      wait (l_ack);
      n_sent++;
      if (!r_ack && r_req) decoupled++;
      #($urandom_range(6, 1)) l_req = 0;
    end
    wait (n_recv == n_sent);
    #20;
    check(n_recv == 500, "token count");
    check(decoupled > 0, "left never acknowledged while right busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
