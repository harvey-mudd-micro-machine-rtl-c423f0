// orrow: one product pair's row of the OR plane.
//
// N_OUT doubleor cells, one per output line, each offering product1 and
// product2 to that output. The scan chain runs from the cell of output
// N_OUT-1 down to output 0, two bits per u_cell (product1 bit first).
// Interface: ph1/ph2, d/q scan chain, product1, product2, pd[j] = pulldown
// request on output line j. Organisation and chain order follow the chip's
// orrow schematic.
module orrow #(
  parameter int N_OUT = hmum_pkg::N_OUT
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             d,
  output logic             q,
  input  logic             product1,
  input  logic             product2,
  output logic [N_OUT-1:0] pd
);
  // chain[N_OUT] is the row's scan input, chain[0] its scan output.
  logic [N_OUT:0] chain;

  assign chain[N_OUT] = d;
  assign q            = chain[0];

  for (genvar j = N_OUT - 1; j >= 0; j--) begin : g_cell
    doubleor u_cell (
      .ph1(ph1), .ph2(ph2),
      .d(chain[j+1]), .q(chain[j]),
      .product1(product1), .product2(product2),
      .pd(pd[j])
    );
  end
endmodule
