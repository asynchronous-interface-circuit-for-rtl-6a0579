// tb_unit_arbiter: checks the two-input unit arbiter.
// A directed tie (both children request together) must go to child 1 and
// child 2 must follow once child 1's cycle is complete. Then both children
// send 300 requests each with random delays against a parent that answers
// with random delays. Checked: the two acknowledges are never high
// together, an acknowledge only reaches a child that holds the grant, each
// request is served exactly once, and the parent sees one clean four-phase
// cycle per request.
module tb_unit_arbiter;
  localparam int K = 300;
  logic rst_n = 1'b0;
  logic r1, a1, r2, a2, r_out, a_in, g1, g2;
  int checks = 0, failures = 0;
  int served1 = 0, served2 = 0, parent_cycles = 0, contention = 0;

  unit_arbiter dut (.rst_n, .r1, .a1, .r2, .a2, .r_out, .a_in, .g1, .g2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(a1 or a2) if (rst_n) check(!(a1 && a2), "both children acknowledged");
  always @(posedge a1) if (rst_n) check(g1 && r1, "a1 without grant");
  always @(posedge a2) if (rst_n) check(g2 && r2, "a2 without grant");
  always @(posedge r_out) if (rst_n) check(!a_in, "parent request while a_in high");

  bit parent_on = 0;
  // A child asking while the other child holds the grant has to wait.
  always @(posedge r1) if (parent_on && g2) contention++;
  always @(posedge r2) if (parent_on && g1) contention++;
  initial begin
    a_in = 0;
    forever begin
      wait (parent_on && r_out);
      parent_cycles++;
      #($urandom_range(12, 1)) a_in = 1;
      wait (!r_out);
      #($urandom_range(12, 1)) a_in = 0;
    end
  end

  task automatic child1();
    repeat (K) begin
      #($urandom_range(15, 1)) r1 = 1;
      wait (a1);
      served1++;
      #($urandom_range(4, 1)) r1 = 0;
      wait (!a1);
    end
  endtask
  task automatic child2();
    repeat (K) begin
      #($urandom_range(15, 1)) r2 = 1;
      wait (a2);
      served2++;
      #($urandom_range(4, 1)) r2 = 0;
      wait (!a2);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; r1 = 0; r2 = 0;
    #2 rst_n = 1;
    #2;
    // Directed tie.
    r1 = 1; r2 = 1;
    #1 check(g1 && !g2 && r_out, "tie not resolved to child 1");
    a_in = 1;
    #1 check(a1 && !a2, "ack not routed to child 1");
    r1 = 0;
    #1 check(!g2 && a1, "child 2 granted before parent returned to zero");
    a_in = 0;
    #1 check(!a1 && g2 && r_out, "child 2 not granted after cycle");
    a_in = 1;
    #1 check(a2, "ack not routed to child 2");
    r2 = 0;
    #1 a_in = 0;
    #2;
    // Random traffic.
    parent_on = 1;
    fork
      child1();
      child2();
    join
    #50;
    check(served1 == K && served2 == K, "request count");
    check(parent_cycles == 2 * K, "parent cycles");
    check(contention > 0, "children never competed");
    $display("contention=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
