// cpa_eac: carry-propagate adder modulo 2^N - 1 with end-around carry.
//
// Adds two N-bit operands and folds the carry out of the top bit back into the
// least significant bit, giving s = |a + b| modulo 2^N - 1. The result is in
// the range 0 .. 2^N - 1, so zero can come out as either all zeros or all ones
// (both represent 0 modulo 2^N - 1); the caller decides whether to normalise.
// The fold is written as a second addition of the carry, which is what a
// ripple-carry adder with its carry output wired to its carry input computes
// (that form has the area of one adder and about twice its delay, but is a
// combinational loop, so it is not written that way here).
//
// The converter uses one instance as its final adder. Purely combinational.
module cpa_eac #(
  parameter int unsigned N = 8 * rc_pkg::DEFAULT_P
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  logic [N:0] t;

  always_comb begin
    t = {1'b0, a} + {1'b0, b};   // t[N] is the end-around carry
    s = t[N-1:0] + N'(t[N]);
  end

endmodule
