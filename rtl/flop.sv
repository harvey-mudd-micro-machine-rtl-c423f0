// flop: two-phase master/slave flip-flop built from two level-sensitive latches.
//
// Every register of the PLA is clocked by a pair of non-overlapping clock
// phases. The master latch is transparent while ph2 is high and the slave
// latch, which drives q, while ph1 is high. A value placed on d is captured
// when ph2 falls and appears on q when ph1 rises, so a chain of these flops
// shifts by one place per ph2/ph1 pulse pair. With non-overlapping phases
// the two latches are never open together, which is what makes a long chain
// of them race-free.
//
// Interface: ph1, ph2 (clock phases), d, q (WIDTH bits).
// The latch pair and phase assignment follow the chip's configuration cell;
// WIDTH defaults to 1 because every scan cell holds one bit.
// The two latches are intentional: a tool listing them as inferred latches
// is reporting this circuit correctly, and a tool that reports the slave as
// "no latch detected" in a larger design has folded its hold behaviour into
// the surrounding logic; simulation keeps both latches.
module flop #(
  parameter int WIDTH = 1
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] master;

  always_latch
    if (ph2) master = d;

  always_latch
    if (ph1) q = master;
endmodule
