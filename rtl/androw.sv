// androw: one input's row of the AND plane.
//
// N_PROD singleand cells, one per product column, all seeing the same input
// a and its complement. The scan chain runs through the cells from the
// highest product column down to product 0 (2 bits per cell), so the row
// holds 2*N_PROD configuration bits. Within a cell the true-input bit comes
// first and the complement-input bit second.
// Interface: ph1/ph2, d/q scan chain, a (input), pd[m] = pulldown request on
// product line m. The row structure follows the chip; the cell order along
// the chain follows its row HDL, the folded routing of the layout is not
// modelled.
module androw #(
  parameter int N_PROD = hmum_pkg::N_PROD
) (
  input  logic              ph1,
  input  logic              ph2,
  input  logic              d,
  output logic              q,
  input  logic              a,
  output logic [N_PROD-1:0] pd
);
  logic a_b;
  // chain[N_PROD] is the row's scan input, chain[0] its scan output.
  logic [N_PROD:0] chain;

  assign a_b           = ~a;
  assign chain[N_PROD] = d;
  assign q             = chain[0];

  for (genvar m = N_PROD - 1; m >= 0; m--) begin : g_cell
    singleand u_cell (
      .ph1(ph1), .ph2(ph2),
      .d(chain[m+1]), .q(chain[m]),
      .a(a), .a_b(a_b),
      .pd(pd[m])
    );
  end
endmodule
