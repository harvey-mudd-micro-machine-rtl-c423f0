// andblock: the AND plane of the PLA.
//
// N_IN androws are stacked, row k serving input k, and their product columns
// are shared: product line m is high unless some cell in column m pulls it
// down (a pseudo-nMOS NOR with a pull-up at the top of the column). Since a
// cell pulls down exactly when its literal is false, product m is the AND of
// the literals configured for it; with no literal selected it is 1.
// The scan chain enters row 0 and leaves row N_IN-1; 2*N_IN*N_PROD bits
// (256 at the default sizes). Bit position p, counted from d, holds
//   input k = p / (2*N_PROD), product m = N_PROD-1 - (p % (2*N_PROD))/2,
//   even p: "requires input 0", odd p: "requires input 1".
// Interface: ph1/ph2 scan clock, d/q scan chain, ins (inputs after the
// feedback mux), products. The products follow ins combinationally.
// Row/column organisation follows the chip; modelling the wired NOR as a
// reduction is this model's choice.
module andblock #(
  parameter int N_IN   = hmum_pkg::N_IN,
  parameter int N_PROD = hmum_pkg::N_PROD
) (
  input  logic              ph1,
  input  logic              ph2,
  input  logic              d,
  output logic              q,
  input  logic [N_IN-1:0]   ins,
  output logic [N_PROD-1:0] products
);
  logic [N_IN:0]   chain;
  logic [N_PROD-1:0] pd [N_IN];

  assign chain[0] = d;
  assign q        = chain[N_IN];

  for (genvar k = 0; k < N_IN; k++) begin : g_row
    androw #(.N_PROD(N_PROD)) row (
      .ph1(ph1), .ph2(ph2),
      .d(chain[k]), .q(chain[k+1]),
      .a(ins[k]),
      .pd(pd[k])
    );
  end

  // Column pull-ups: a product line stays high unless a cell pulls it down.
  always_comb begin
    logic [N_PROD-1:0] pulled;
    pulled = '0;
    for (int k = 0; k < N_IN; k++) pulled |= pd[k];
    products = ~pulled;
  end
endmodule
