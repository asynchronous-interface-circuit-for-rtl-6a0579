// mutex2: two-way mutual exclusion element.
//
// Grants at most one of two requests. A request that arrives while the other
// side holds the grant waits until that side releases its request. The
// grant is then passed on. In silicon this is a cross-coupled latch followed
// by a metastability filter; in this two-state, zero-delay model a tie
// (both requests rising together) is resolved in favour of r1, which is one
// of the outcomes the real element may produce.
//
// Interface: r1/r2 requests, g1/g2 grants; g1 & g2 is never true. A grant
// falls as soon as its request falls. Active-low reset clears both grants.
//
// Circuit warning: the two latches are the element's state.
module mutex2 (
  input  logic rst_n,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!rst_n) begin
      g1 = 1'b0;
      g2 = 1'b0;
    end else begin
      if (!r1) g1 = 1'b0;
      if (!r2) g2 = 1'b0;
      if (r1 && !g1 && !g2)      g1 = 1'b1;
      else if (r2 && !g1 && !g2) g2 = 1'b1;
    end
  end

  // The element's one rule.
  always_comb if (rst_n) a_exclusive: assert (!(g1 && g2));
endmodule
