// csa_eac: carry-save adder modulo 2^N - 1 with end-around carry.
//
// Reduces three N-bit operands to a sum vector and a carry vector whose total
// is congruent to a + b + c modulo 2^N - 1. Each bit position is one full adder:
// s is the bitwise sum, and the carry vector is the bitwise majority shifted
// left by one place, with the carry leaving the top bit fed back into bit 0
// (2^N is congruent to 1 modulo 2^N - 1). No carry ripples, so the delay is one
// full adder whatever N is.
//
// The five carry-save stages of the converter are instances of this module.
// The N-bit width and the end-around carry follow the converter description;
// the plain full-adder-per-bit form is the simplest structure that does it.
// Purely combinational.
module csa_eac #(
  parameter int unsigned N = 8 * rc_pkg::DEFAULT_P
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);

  logic [N-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    cy  = {maj[N-2:0], maj[N-1]};
  end

endmodule
