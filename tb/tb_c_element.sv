// tb_c_element: checks the Muller C-element against a reference model.
// It applies every input transition from every state, then 2000 random
// input pairs, and compares the output with the rule "copy when equal,
// hold otherwise". It also checks that reset clears the output.
module tb_c_element;
  logic rst_n = 1'b0;
  logic a, b, c;
  logic model;
  int   checks = 0, failures = 0;

  c_element dut (.rst_n, .a, .b, .c);

  task automatic apply(input logic na, input logic nb);
    a = na; b = nb;
    #1;
    if (a == b) model = a;
    checks++;
    if (c !== model) begin
      failures++;
      $display("FAIL a=%b b=%b c=%b expected %b", a, b, c, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; a = 1; b = 1; model = 0;
    #1;
    checks++;
    if (c !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; a = 0; b = 0;
    #1;
    // Walk: rise one input, then the other, fall one, then the other.
    apply(1, 0); apply(1, 1); apply(0, 1); apply(1, 1);
    apply(1, 0); apply(0, 0); apply(0, 1); apply(0, 0);
    apply(1, 1); apply(0, 0);
    for (int i = 0; i < 2000; i++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
