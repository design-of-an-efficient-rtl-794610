// rc_pkg: constants and helpers shared by the residue-to-binary converter for the
// five-moduli set {2^{2p}, 2^{4p}+1, 2^{2p}+1, 2^p+1, 2^p-1}.
//
// DEFAULT_P = 3 is the word-length parameter of the reference configuration
// (an 8p = 24-bit modulo 2^{8p}-1 datapath, 30-bit dynamic range). The helper
// functions give the widths of the residue channels and the output, and reduce
// a rotation amount into the range 0..n-1, which the operand preparation needs
// because one of its rotations (by p-3) is negative for p = 2.
package rc_pkg;

  localparam int unsigned DEFAULT_P = 3;

  // Width of the modulo 2^{8p}-1 datapath (CSA tree and final adder).
  function automatic int unsigned dp_width(int unsigned p);
    return 8 * p;
  endfunction

  // Width of the converted binary number: 2p bits from x1 plus 8p bits of M.
  function automatic int unsigned out_width(int unsigned p);
    return 10 * p;
  endfunction

  // Rotation amount r reduced modulo n into 0..n-1 (r may be negative).
  function automatic int unsigned rot_amount(int r, int unsigned n);
    int m;
    m = r % int'(n);
    if (m < 0) m += int'(n);
    return int'(m);
  endfunction

endpackage
