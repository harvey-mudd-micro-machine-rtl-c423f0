// muxslice: the per-input feedback multiplexers in front of the AND plane.
//
// For each input k, y[k] is d1[k] (the registered output k) when s[k] is 1
// and d0[k] (the pin DIN[k]) when s[k] is 0. Purely combinational.
// Interface: d0, d1, s, y, all N bits.
module muxslice #(
  parameter int N = hmum_pkg::N_FB
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic [N-1:0] s,
  output logic [N-1:0] y
);
  always_comb
    for (int k = 0; k < N; k++)
      y[k] = s[k] ? d1[k] : d0[k];
endmodule
