// tb_spike_shaper: checks spike shaping for one core (100 buffers).
// A distribution model sends 400 requests with random buffer addresses
// (including addresses beyond the last buffer); a spike-buffer model
// acknowledges each pulse after a random width. Checked: exactly the
// addressed buffer pulses, the pulse lasts exactly until buf_ack rises
// (its width is set by the buffer side), ack to the distribution side
// rises only after the buffer acknowledged, and an address beyond
// N_BUFFERS produces no pulse and is acknowledged at once.
module tb_spike_shaper;
  localparam int NB = 100, BW = 7;
  logic rst_n = 1'b0;
  logic          req, ack, buf_ack;
  logic [BW-1:0] local_addr;
  logic [NB-1:0] spike;
  int checks = 0, failures = 0;
  int pulses = 0, dropped = 0;
  int want_width = 0;
  time t_rise;

  spike_shaper dut (.rst_n, .req, .ack, .local_addr, .spike, .buf_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Spike-buffer model.
  initial begin
    buf_ack = 0;
    forever begin
      wait (rst_n && (|spike));
      t_rise = $time;
      check($onehot(spike), "more than one buffer pulsed");
      check(int'(local_addr) < NB && spike[local_addr], "wrong buffer pulsed");
      want_width = $urandom_range(9, 2);
      #(want_width);
      check(|spike, "pulse ended before the buffer acknowledged");
      buf_ack = 1;
      #0;
      wait (!(|spike));
      check(($time - t_rise) == want_width, "pulse width");
      pulses++;
      #($urandom_range(4, 1)) buf_ack = 0;
    end
  end

  always @(posedge ack) if (rst_n && int'(local_addr) < NB) check(buf_ack, "ack before buffer acknowledge");

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; req = 0; local_addr = '0;
    #2 rst_n = 1;
    #2;
    for (int i = 0; i < 400; i++) begin
      logic [BW-1:0] a;
      a = BW'($urandom);
      #($urandom_range(5, 1));
      local_addr = a;
      req = 1;
      if (int'(a) >= NB) begin
        #1 check(ack && spike == '0, "out-of-range address not dropped");
        dropped++;
      end
      wait (ack);
      #($urandom_range(3, 1)) req = 0;
      wait (!ack);
    end
    #20;
    check(pulses + dropped == 400, "request count");
    check(dropped > 0 && pulses > 0, "both pulses and dropped addresses must occur");
    $display("pulses=%0d dropped=%0d", pulses, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
