// il_stage: intermediate latching stage with a bundled data word.
//
// Same controller as il_ctrl, plus a W-bit storage latch for the data that
// travels with the request (here the encoded AER address). The data is
// captured in the same step that sets the token and acknowledges the left
// side. It is held on r_data for as long as r_req is high. Bundled-data
// rule: l_data must be valid when l_req rises and stay so until l_ack
// rises; it may change after that.
//
// Handshakes (four-phase on both sides):
//   left : l_req+  l_ack+  l_req-  l_ack-   (l_data valid with l_req+)
//   right: r_req+  r_ack+  r_req-  r_ack-   (r_data valid while r_req)
// l_ack rises as soon as the word is latched, whatever the right side is
// doing. This lets the receiver of an AER channel answer a request quickly.
//
// Circuit warning: the latches are the storage unit of the template.
module il_stage #(
  parameter int W = 8
) (
  input  logic         rst_n,
  input  logic         l_req,
  output logic         l_ack,
  input  logic [W-1:0] l_data,
  output logic         r_req,
  input  logic         r_ack,
  output logic [W-1:0] r_data
);
  logic         full;
  logic [W-1:0] store;

  always_latch begin
    if (!rst_n) begin
      full  = 1'b0;
      l_ack = 1'b0;
      store = '0;
    end else if (l_req && !l_ack && !full && !r_ack) begin
      full  = 1'b1;
      l_ack = 1'b1;
      store = l_data;
    end else begin
      if (!l_req && l_ack) l_ack = 1'b0;
      if (full && r_ack)   full  = 1'b0;
    end
  end

  assign r_req  = full;
  assign r_data = store;

  // Four-phase rule on the left side: l_ack rises only in answer to l_req.
  always @(posedge l_ack) if (rst_n) a_lack_rise: assert (l_req);
endmodule
