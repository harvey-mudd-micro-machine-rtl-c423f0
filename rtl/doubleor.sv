// doubleor: the OR-plane cell where two product lines cross one output line.
//
// Two configpull cells share one output line. The first in the scan chain is
// gated by product1, the second by product2. A stored 1 adds that product to
// the output's sum: the output line is pulled low (and the buffered output
// goes high) when a selected product is 1.
// Interface: ph1/ph2, d/q scan chain (2 bits), product1, product2,
// pd (pulldown request on the output line). Pairing two products per cell
// follows the chip's doubleor schematic, which lets the OR plane use the same
// row pitch as the AND plane.
module doubleor (
  input  logic ph1,
  input  logic ph2,
  input  logic d,
  output logic q,
  input  logic product1,
  input  logic product2,
  output logic pd
);
  logic d_q;
  logic pd1, pd2;

  configpull i0 (.ph1(ph1), .ph2(ph2), .d(d),   .q(d_q), .a(product1), .pd(pd1));
  configpull i1 (.ph1(ph1), .ph2(ph2), .d(d_q), .q(q),   .a(product2), .pd(pd2));

  assign pd = pd1 | pd2;
endmodule
