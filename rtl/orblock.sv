// orblock: the OR plane of the PLA.
//
// N_PROD/2 orrows are stacked; row i carries products 2i+1 (product1) and 2i
// (product2) across all N_OUT output lines. Each output line is a
// pseudo-nMOS NOR of the products configured onto it, and an inverting
// buffer turns it into outs[j] = OR of those products.
// The scan chain enters row 0 and leaves the last row; N_PROD*N_OUT bits
// (256 at the default sizes). Bit position p, counted from d, holds
//   row i = p / (2*N_OUT), output j = N_OUT-1 - (p % (2*N_OUT))/2,
//   product 2i+1 for even p, product 2i for odd p.
// Pairing the products this way makes the OR plane's chain run along product
// rows rather than along outputs.
// Interface: ph1/ph2 scan clock, d/q scan chain, products, outs
// (combinational from products). N_PROD must be even.
module orblock #(
  parameter int N_PROD = hmum_pkg::N_PROD,
  parameter int N_OUT  = hmum_pkg::N_OUT
) (
  input  logic              ph1,
  input  logic              ph2,
  input  logic              d,
  output logic              q,
  input  logic [N_PROD-1:0] products,
  output logic [N_OUT-1:0]  outs
);
  localparam int N_ROWS = N_PROD / 2;

  logic [N_ROWS:0]  chain;
  logic [N_OUT-1:0] pd [N_ROWS];
  logic [N_OUT-1:0] or_line;

  assign chain[0] = d;
  assign q        = chain[N_ROWS];

  for (genvar i = 0; i < N_ROWS; i++) begin : g_row
    orrow #(.N_OUT(N_OUT)) row (
      .ph1(ph1), .ph2(ph2),
      .d(chain[i]), .q(chain[i+1]),
      .product1(products[2*i+1]), .product2(products[2*i]),
      .pd(pd[i])
    );
  end

  // Pulled-up output lines (NOR), then the inverting output buffers.
  always_comb begin
    logic [N_OUT-1:0] pulled;
    pulled = '0;
    for (int i = 0; i < N_ROWS; i++) pulled |= pd[i];
    or_line = ~pulled;
  end

  assign outs = ~or_line;

  initial assert (N_PROD % 2 == 0) else $error("orblock: N_PROD must be even");
endmodule
