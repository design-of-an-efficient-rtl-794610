// operand_prep: operand preparation for the residue-to-binary converter of the
// moduli set {m1, m2, m3, m4, m5} = {2^{2p}, 2^{4p}+1, 2^{2p}+1, 2^p+1, 2^p-1}.
//
// The converter evaluates the new Chinese Remainder Theorem I (CRT-I) form
//   X = x1 + m1 * M,
//   M = | k1(x2-x1) + k2 m2 (x3-x2) + k3 m2 m3 (x4-x3) + k4 m2 m3 m4 (x5-x4) |_(2^{8p}-1)
// where m2 m3 m4 m5 = 2^{8p}-1 and the multiplicative inverses are
//   k1 = 2^{6p}, k2 = 2^{2p-1}, k3 = 2^{2p-2}, k4 = 2^{2p-3} (the last one modulo 2^p-1).
// Every coefficient is then a short signed sum of powers of two, and modulo
// 2^{8p}-1 a multiplication by 2^k is a k-place left rotation and a negation is
// a bitwise inversion. This block produces the seven 8p-bit vectors H1..H7
// (h[0]..h[6]) whose sum modulo 2^{8p}-1 is M; it is wiring plus 9p inverters
// and 7p gates for the top bits of the 2^k+1 channels.
//
//   H1 = -k1 x1           : {~x1, 6p ones}
//   H2 =  k1 x2           : x2 (4p+1 bits) rotated left by 6p
//   H3 = -k2 m2 x2        : {~x2', ~x2'} rotated left by 2p-1, x2' = x2[4p-1:0] | x2[4p]
//                           (this term only depends on x2 modulo 2^{4p}-1, where 2^{4p} = 1)
//   H4 = (k2 m2 - k3 m2 m3) x3 = (2^{2p-2} - 2^{4p-2} + 2^{6p-2} - 2^{8p-2}) x3
//                         : {~y3, x3, ~y3, x3} rotated left by 2p-2
//   H5 = (k3 m2 m3 - k4 m2 m3 m4) x4 = 2^{p-3} (2^p - 1)(1 + 2^{2p} + 2^{4p} + 2^{6p}) x4
//                         : {x4, ~y4} repeated four times, rotated left by p-3 (mod 8p)
//   H6 =  k4 m2 m3 m4 x5  = 2^{2p-3} (1 + 2^p + ... + 2^{7p}) x5
//                         : x5 repeated eight times, rotated left by 2p-3
//   H7 = constant that cancels the all-ones fields the inversions in H4 and H5 add.
// x3 and x4 enter H4/H5 with their low 2p resp. p bits; y3 (y4) is that low part
// with every bit forced to 1 when the residue's top bit is set. A residue of a
// 2^k+1 channel equal to 2^k has its low bits all zero, and for that value the
// vector must be all zeros, which is exactly what forcing the inverted fields to
// 0 gives (c * 2^k = -c modulo 2^{8p}-1 for these coefficients).
//
// Some output bits are constants by construction (the low 6p bits of H1, the
// unused middle of H2, all of H7); synthesis folds them into the adders.
//
// Inputs must be valid residues: x2 <= 2^{4p}, x3 <= 2^{2p}, x4 <= 2^p, x5 <= 2^p-1
// (x5 = 2^p-1 is accepted as a second code for 0). Purely combinational.
module operand_prep #(
  parameter int unsigned P = rc_pkg::DEFAULT_P
) (
  input  logic [2*P-1:0]        x1,   // modulo 2^{2p}
  input  logic [4*P:0]          x2,   // modulo 2^{4p}+1
  input  logic [2*P:0]          x3,   // modulo 2^{2p}+1
  input  logic [P:0]            x4,   // modulo 2^p+1
  input  logic [P-1:0]          x5,   // modulo 2^p-1
  output logic [6:0][8*P-1:0]   h     // h[i] is H(i+1)
);

  localparam int unsigned N = rc_pkg::dp_width(P);

  // Rotation amounts of the H vectors (all reduced into 0..N-1).
  localparam int unsigned R2 = rc_pkg::rot_amount(6 * P, N);
  localparam int unsigned R3 = rc_pkg::rot_amount(2 * P - 1, N);
  localparam int unsigned R4 = rc_pkg::rot_amount(2 * P - 2, N);
  localparam int unsigned R5 = rc_pkg::rot_amount(int'(P) - 3, N);
  localparam int unsigned R6 = rc_pkg::rot_amount(2 * P - 3, N);

  function automatic logic [N-1:0] rotl(logic [N-1:0] v, int unsigned k);
    return (k == 0) ? v : ((v << k) | (v >> (N - k)));
  endfunction

  // Unrotated patterns of H4 and H5 with the residue bits all zero, i.e. the
  // all-ones fields that the inversions introduce; their sum is cancelled by H7.
  function automatic logic [N-1:0] ones_h4();
    logic [N-1:0] v;
    v = '0;
    for (int i = 0; i < 2 * int'(P); i++) begin
      v[2*P + i] = 1'b1;
      v[6*P + i] = 1'b1;
    end
    return rotl(v, R4);
  endfunction

  function automatic logic [N-1:0] ones_h5();
    logic [N-1:0] v;
    v = '0;
    for (int k = 0; k < 8; k += 2)
      for (int i = 0; i < int'(P); i++)
        v[k*P + i] = 1'b1;
    return rotl(v, R5);
  endfunction

  // H7 = -(ones_h4 + ones_h5) modulo 2^N - 1.
  function automatic logic [N-1:0] calc_k7();
    logic [N:0]   t;
    logic [N-1:0] u;
    t = {1'b0, ones_h4()} + {1'b0, ones_h5()};
    u = t[N-1:0] + N'(t[N]);
    return ~u;
  endfunction

  localparam logic [N-1:0] K7 = calc_k7();

  logic [4*P-1:0] x2p;
  logic [2*P-1:0] x3l, y3;
  logic [P-1:0]   x4l, y4;
  logic [N-1:0]   v2, v3, v4, v5, v6;

  always_comb begin
    x2p = x2[4*P-1:0] | (4*P)'(x2[4*P]);
    x3l = x3[2*P-1:0];
    y3  = x3l | {(2*P){x3[2*P]}};
    x4l = x4[P-1:0];
    y4  = x4l | {P{x4[P]}};

    v2 = N'(x2);
    v3 = {~x2p, ~x2p};
    v4 = {~y3, x3l, ~y3, x3l};
    for (int k = 0; k < 8; k++) begin
      v5[k*P +: P] = (k % 2 == 1) ? x4l : ~y4;
      v6[k*P +: P] = x5;
    end

    h[0] = {~x1, {(6*P){1'b1}}};
    h[1] = rotl(v2, R2);
    h[2] = rotl(v3, R3);
    h[3] = rotl(v4, R4);
    h[4] = rotl(v5, R5);
    h[5] = rotl(v6, R6);
    h[6] = K7;
  end

endmodule
