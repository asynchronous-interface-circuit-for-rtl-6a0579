// c_element: two-input Muller C-element with an active-low reset.
//
// The output copies the inputs when both agree and keeps its value while
// they differ. It is the state-holding gate of every handshake controller
// in this interface. It is written as a transparent latch whose enable is
// (a == b), so synthesis maps it to one latch plus an XNOR. rst_n clears the
// output to 0, the idle level of the four-phase handshakes; a reset is not
// described for the original circuit and is added here so that simulation
// and silicon start from a known state.
//
// Interface: a, b inputs; c output. No clock: the output changes as soon as
// both inputs agree.
//
// Circuit warning: the latch is intended; the C-element is a state-holding
// gate.
module c_element (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);
  always_latch begin
    if (!rst_n)      c = 1'b0;
    else if (a == b) c = a;
  end
endmodule
