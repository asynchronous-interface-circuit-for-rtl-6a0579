// tb_mutex2: checks the mutual exclusion element.
// Directed cases: each side alone, r1 first then r2 (r2 must wait until r1
// is released), r2 first then r1, and both at once (r1 wins). Then random
// request sequences that follow the four-phase rule (a request falls only
// once granted) are compared with a first-come first-served model.
module tb_mutex2;
  logic rst_n = 1'b0;
  logic r1, r2, g1, g2;
  int   checks = 0, failures = 0;
  int   waits = 0, ties = 0;

  mutex2 dut (.rst_n, .r1, .r2, .g1, .g2);

  task automatic expect_g(input logic e1, input logic e2, input string what);
    #1;
    checks++;
    if (g1 !== e1 || g2 !== e2) begin
      failures++;
      $display("FAIL %s: g1=%b g2=%b expected %b %b", what, g1, g2, e1, e2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m1, m2;  // model grants
  initial begin
    rst_n = 0; r1 = 0; r2 = 0;
    #1 rst_n = 1;
    expect_g(0, 0, "idle");
    r1 = 1;            expect_g(1, 0, "r1 alone");
    r1 = 0;            expect_g(0, 0, "r1 released");
    r2 = 1;            expect_g(0, 1, "r2 alone");
    r2 = 0;            expect_g(0, 0, "r2 released");
    r1 = 1;            expect_g(1, 0, "r1 first");
    r2 = 1;            expect_g(1, 0, "r2 blocked");
    r1 = 0;            expect_g(0, 1, "r2 passed on");
    r1 = 1;            expect_g(0, 1, "r1 blocked");
    r2 = 0;            expect_g(1, 0, "r1 passed on");
    r1 = 0;            expect_g(0, 0, "both released");
    r1 = 1; r2 = 1;    expect_g(1, 0, "tie");
    r1 = 0;            expect_g(0, 1, "after tie");
    r2 = 0;            expect_g(0, 0, "end of directed");
    // Random, four-phase-legal traffic against a model.
    m1 = 0; m2 = 0;
    for (int i = 0; i < 4000; i++) begin
      logic t1, t2;
      t1 = 1'($urandom); t2 = 1'($urandom);
      // a request may fall only while granted
      if (r1 && !g1) t1 = 1;
      if (r2 && !g2) t2 = 1;
      if (t1 && t2 && !r1 && !r2) ties++;
      r1 = t1; r2 = t2;
      if (!r1) m1 = 0;
      if (!r2) m2 = 0;
      if (r1 && !m1 && !m2) m1 = 1;
      else if (r2 && !m1 && !m2) m2 = 1;
      if ((r1 && !m1) || (r2 && !m2)) waits++;
      expect_g(m1, m2, "random");
      checks++;
      if (g1 && g2) begin failures++; $display("FAIL both granted"); end
    end
    checks++;
    if (waits == 0 || ties == 0) begin
      failures++;
      $display("FAIL random traffic never made a request wait (%0d) or tie (%0d)", waits, ties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
