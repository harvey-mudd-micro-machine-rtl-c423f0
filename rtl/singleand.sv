// singleand: the AND-plane cell where one input crosses one product line.
//
// Two configpull cells sit on the same product line. The first in the scan
// chain is gated by the input a, the second by its complement a_b. The
// product line is high only if nothing pulls it down, so the two stored bits
// (first, second) select the literal the product needs:
//   00  input is a don't-care
//   10  product requires a = 0   (line pulled down when a = 1)
//   01  product requires a = 1   (line pulled down when a = 0)
//   11  product is always 0
// Interface: ph1/ph2, d/q scan chain (2 bits), a, a_b, pd (pulldown request
// on the product line). The cell arrangement follows the chip's singleand
// schematic.
module singleand (
  input  logic ph1,
  input  logic ph2,
  input  logic d,
  output logic q,
  input  logic a,
  input  logic a_b,
  output logic pd
);
  logic d_q;
  logic pd_true, pd_comp;

  configpull i0 (.ph1(ph1), .ph2(ph2), .d(d),   .q(d_q), .a(a),   .pd(pd_true));
  configpull i1 (.ph1(ph1), .ph2(ph2), .d(d_q), .q(q),   .a(a_b), .pd(pd_comp));

  // Both transistors stacks hang on the same product line.
  assign pd = pd_true | pd_comp;
endmodule
