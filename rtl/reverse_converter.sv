// reverse_converter: residue-to-binary converter for the five-moduli set
// {2^{2p}, 2^{4p}+1, 2^{2p}+1, 2^p+1, 2^p-1}, dynamic range about 10p bits.
//
// With m1 = 2^{2p} first, CRT-I gives X = x1 + 2^{2p} * M, where M is a sum of
// seven vectors H1..H7 modulo 2^{8p}-1 (see operand_prep). The datapath is:
//   operand_prep           -> H1..H7 (wiring, inverters, a few gates)
//   CSA1(H1,H2,H3), CSA2(H5,H6,H7)
//   CSA3(CSA1.s, CSA1.c, H4)
//   CSA4(CSA3.s, CSA3.c, CSA2.s)
//   CSA5(CSA4.s, CSA4.c, CSA2.c)
//   CPA1(CSA5.s, CSA5.c)   -> M
// All adders are 8p bits wide and work modulo 2^{8p}-1 with end-around carry.
// X is the concatenation {M, x1}: no adder is needed for the last step, so the
// low 2p output bits are x1 wired straight through.
//
// The final adder can return all ones, the second code of 0 modulo 2^{8p}-1;
// since X must be below 2^{2p}(2^{8p}-1), that code is mapped to zero before
// the concatenation (an 8p-input AND and a row of AND gates). That correction
// is this design's own addition; the rest of the structure (operand preparation,
// five CSAs with EAC in the tree above, one CPA with EAC, concatenation with x1)
// follows the converter description.
//
// Interface: residues x1..x5 in, X out, valid residues assumed (see
// operand_prep). Purely combinational; the critical path is the inverters of
// the operand preparation, four full-adder levels of the CSA tree and the
// end-around-carry adder.
module reverse_converter #(
  parameter int unsigned P = rc_pkg::DEFAULT_P
) (
  input  logic [2*P-1:0]  x1,   // modulo 2^{2p}
  input  logic [4*P:0]    x2,   // modulo 2^{4p}+1
  input  logic [2*P:0]    x3,   // modulo 2^{2p}+1
  input  logic [P:0]      x4,   // modulo 2^p+1
  input  logic [P-1:0]    x5,   // modulo 2^p-1
  output logic [rc_pkg::out_width(P)-1:0] x   // binary value, 0 <= x < 2^{2p}(2^{8p}-1)
);

  localparam int unsigned N = rc_pkg::dp_width(P);

  logic [6:0][N-1:0] h;
  logic [N-1:0] s1, c1, s2, c2, s3, c3, s4, c4, s5, c5;
  logic [N-1:0] m_raw, m;

  operand_prep #(.P(P)) u_opu (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .h(h)
  );

  csa_eac #(.N(N)) u_csa1 (.a(h[0]), .b(h[1]), .c(h[2]), .s(s1), .cy(c1));
  csa_eac #(.N(N)) u_csa2 (.a(h[4]), .b(h[5]), .c(h[6]), .s(s2), .cy(c2));
  csa_eac #(.N(N)) u_csa3 (.a(s1),   .b(c1),   .c(h[3]), .s(s3), .cy(c3));
  csa_eac #(.N(N)) u_csa4 (.a(s3),   .b(c3),   .c(s2),   .s(s4), .cy(c4));
  csa_eac #(.N(N)) u_csa5 (.a(s4),   .b(c4),   .c(c2),   .s(s5), .cy(c5));

  cpa_eac #(.N(N)) u_cpa1 (.a(s5), .b(c5), .s(m_raw));

  always_comb begin
    m = (&m_raw) ? '0 : m_raw;
    x = {m, x1};
  end

endmodule
