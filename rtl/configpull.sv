// configpull: one configuration bit of the PLA with its configurable pulldown.
//
// The cell is a two-phase flop that is part of the configuration scan chain
// (d in, q out to the next cell) plus two series nMOS transistors that pull a
// shared bit line low when both the logic input a and the stored bit are 1.
// Many cells share one bit line with a weak pull-up, forming a pseudo-nMOS
// NOR; here the cell reports its pulldown request on pd (= a & q) and the
// block that owns the bit line computes the NOR of all requests on it.
//
// Interface: ph1/ph2 scan clock phases; d/q scan chain; a logic input;
// pd pulldown request. Timing: q changes only while ph1 is high; pd follows a
// combinationally. The stored bit has no reset: a configuration is always
// scanned in before use.
module configpull (
  input  logic ph1,
  input  logic ph2,
  input  logic d,
  output logic q,
  input  logic a,
  output logic pd
);
  flop #(.WIDTH(1)) cfg (.ph1(ph1), .ph2(ph2), .d(d), .q(q));

  assign pd = a & q;
endmodule
