// feedbackflops: the state register of the PLA.
//
// N two-phase flops, clocked by the logic clock, that register DOUT[N-1:0]
// so it can be fed back to the AND plane. A multiplexer in front of the
// master latch substitutes zero while reset is 1, so reset is synchronous:
// it clears q at the next logic clock (ph2 then ph1) and leaves the
// configuration chain untouched.
// Interface: ph1/ph2 logic clock, reset (active high), d, q.
// Timing: d and reset are sampled while ph2 is high; q changes while ph1 is
// high. Reset polarity is this model's choice (the chip's pin is "reset").
module feedbackflops #(
  parameter int N = hmum_pkg::N_FB
) (
  input  logic         ph1,
  input  logic         ph2,
  input  logic         reset,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  logic [N-1:0] d_or_zero;

  assign d_or_zero = reset ? '0 : d;

  flop #(.WIDTH(N)) state (.ph1(ph1), .ph2(ph2), .d(d_or_zero), .q(q));
endmodule
