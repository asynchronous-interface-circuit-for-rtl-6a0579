// tb_il_stage: checks the intermediate latching stage with data.
// Part 1, right side stalled: the first word must be acknowledged to the
// left at once (within one time unit) and then held on r_data; a second
// word must not be acknowledged while the first is still stored
// (back-pressure); once the right side takes the first word the second
// is latched and acknowledged.
// Part 2, random delays on both sides: every word arrives once, in order,
// unchanged, and r_req never falls before r_ack rose.
module tb_il_stage;
  localparam int W = 9;
  logic rst_n = 1'b0;
  logic         l_req, l_ack, r_req, r_ack;
  logic [W-1:0] l_data, r_data;
  int checks = 0, failures = 0;
  int decoupled = 0, stalled = 0;
  logic [W-1:0] expq[$];
  int n_sent = 0, n_recv = 0;
  bit  rx_auto = 0;

  il_stage #(.W(W)) dut (.rst_n, .l_req, .l_ack, .l_data, .r_req, .r_ack, .r_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [W-1:0] d, input int hold);
    wait (!l_ack);
    l_data = d;
    #1 l_req = 1;
    wait (l_ack);
    expq.push_back(d);
    n_sent++;
    if (!r_ack && r_req) decoupled++;
    #(hold) l_req = 0;
    wait (!l_ack);
  endtask

  // Right-hand receiver with random delays.
  initial begin
    r_ack = 0;
    forever begin
      wait (rx_auto && r_req);
      #($urandom_range(8, 1));
      check(expq.size() > 0, "word arrived that was not sent");
      if (expq.size() > 0) check(r_data == expq.pop_front(), "word changed or out of order");
      n_recv++;
      r_ack = 1;
      wait (!r_req);
      #($urandom_range(8, 1)) r_ack = 0;
    end
  end

  always @(negedge r_req) if (rst_n) check(r_ack, "r_req fell before r_ack");

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; l_req = 0; l_data = '0;
    #2 rst_n = 1;
    #2;
    // Part 1: right side stalled.
    l_data = 9'h1A5;
    l_req  = 1;
    #1 check(l_ack, "first word not acknowledged at once");
    check(r_req && r_data == 9'h1A5, "first word not offered to the right");
    l_req = 0;
    #1 check(!l_ack, "l_ack did not return to zero");
    l_data = 9'h05A;
    l_req  = 1;
    #20 check(!l_ack, "second word acknowledged while storage full");
    if (!l_ack) stalled++;
    check(r_data == 9'h1A5, "stored word overwritten");
    r_ack = 1;
    #1 check(!r_req, "storage not emptied by r_ack");
    check(!l_ack, "second word latched before right returned to zero");
    r_ack = 0;
    #1 check(l_ack && r_req && r_data == 9'h05A, "second word not latched after release");
    l_req = 0;
    r_ack = 1;
    #1 r_ack = 0;
    #1;
    // Part 2: random traffic.
    rx_auto = 1;
    for (int i = 0; i < 500; i++) send(W'($urandom), $urandom_range(6, 1));
    wait (n_recv == n_sent);
    #10;
    check(n_recv == 500, "word count");
    check(expq.size() == 0, "words left over");
    check(decoupled > 0, "left side never acknowledged while right side was still busy");
    check(stalled > 0, "back-pressure never seen");
    $display("decoupled acknowledges: %0d", decoupled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
