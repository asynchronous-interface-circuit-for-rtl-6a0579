// il_ctrl: intermediate latching stage for a request token without data.
//
// This is the control part of the intermediate latching template. A stage of
// a conventional half-buffer pipeline can acknowledge its left neighbour only
// once the right neighbour has taken the token. Here the stage latches the
// token into its own storage and acknowledges the left side at once. The
// left side can then return to zero and prepare its next token while the
// stored token waits for the right side. The two handshakes are decoupled,
// so a slow right side does not stall the left side's reset.
//
// Both sides use the four-phase (return-to-zero) protocol:
//   left : l_req+  l_ack+  l_req-  l_ack-
//   right: r_req+  r_ack+  r_req-  r_ack-
// State: 'full' (the storage unit holds a token, driven out as r_req) and
// l_ack. One step latches the token: l_req high, l_ack low, storage empty
// and the right side returned to zero. It sets full and l_ack together.
// l_ack falls when l_req falls. The storage empties when r_ack rises. A new
// token is taken only after both handshakes have returned to zero, so the
// stage holds at most one token. When it is full, the left side's next
// request waits: this is the back-pressure.
//
// The storage unit, completion detector and Muller gates of the published
// circuit are folded into one latch process here. The gate netlist is not
// reproduced; the order of handshake events is.
//
// Circuit warning: the latches are the storage unit of the template.
module il_ctrl (
  input  logic rst_n,
  input  logic l_req,
  output logic l_ack,
  output logic r_req,
  input  logic r_ack
);
  logic full;

  always_latch begin
    if (!rst_n) begin
      full  = 1'b0;
      l_ack = 1'b0;
    end else if (l_req && !l_ack && !full && !r_ack) begin
      full  = 1'b1;
      l_ack = 1'b1;
    end else begin
      if (!l_req && l_ack) l_ack = 1'b0;
      if (full && r_ack)   full  = 1'b0;
    end
  end

  assign r_req = full;

  // Four-phase rule on the left side: l_ack rises only in answer to l_req.
  always @(posedge l_ack) if (rst_n) a_lack_rise: assert (l_req);
endmodule
