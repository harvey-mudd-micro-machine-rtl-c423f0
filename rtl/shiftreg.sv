// shiftreg: the feedback-select bits at the end of the configuration chain.
//
// N two-phase flops in series on the scan clock. Bit q[k] selects, for input
// k of the AND plane, the registered output k instead of DIN[k]. The chain
// enters at q[0]; q[N-1] is the last bit of the whole configuration chain and
// drives the chip's configQ pin.
// Interface: ph1/ph2 scan clock, d scan in, q[N-1:0]. One place per
// ph2/ph1 pulse pair, no reset (the configuration is always scanned in).
module shiftreg #(
  parameter int N = hmum_pkg::N_FB
) (
  input  logic         ph1,
  input  logic         ph2,
  input  logic         d,
  output logic [N-1:0] q
);
  logic [N:0] chain;

  assign chain[0] = d;
  assign q        = chain[N:1];

  for (genvar k = 0; k < N; k++) begin : g_bit
    flop #(.WIDTH(1)) bit_k (.ph1(ph1), .ph2(ph2), .d(chain[k]), .q(chain[k+1]));
  end
endmodule
