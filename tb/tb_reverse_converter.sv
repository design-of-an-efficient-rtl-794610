// tb_reverse_converter: end-to-end test of the residue-to-binary converter at
// its default size (p = 3: moduli 64, 4097, 65, 9, 7; 30-bit output).
//
// Each test picks X below the dynamic range, forms the five residues with the
// % operator, and checks that the converter returns X exactly. Test numbers:
// every X below 2^{2p} (M = 0, where the final adder may return its all-ones
// code for zero), the last numbers of the range, X = d*k - 1 for d = m2, m3,
// m4 and m2*m3*m4 (so that x2, x3, x4 take the value 2^k alone and together),
// and random numbers. When x5 is 0 it is given half of the time as 2^p - 1,
// the second code of zero in a modulo 2^p - 1 channel.
// Mechanisms counted, each of which must happen at least once: top bit of x2,
// x3 and x4 set; x5 given as 2^p - 1; end-around carry in the final adder; the
// all-ones result of the final adder mapped to zero.
module tb_reverse_converter;
  localparam int unsigned P = rc_pkg::DEFAULT_P;
  localparam int unsigned N = 8 * P;
  localparam longint unsigned M1 = 64'd1 << (2*P);
  localparam longint unsigned M2 = (64'd1 << (4*P)) + 1;
  localparam longint unsigned M3 = (64'd1 << (2*P)) + 1;
  localparam longint unsigned M4 = (64'd1 << P) + 1;
  localparam longint unsigned M5 = (64'd1 << P) - 1;
  localparam longint unsigned MTOT = M1 * M2 * M3 * M4 * M5;

  logic [2*P-1:0]  x1;
  logic [4*P:0]    x2;
  logic [2*P:0]    x3;
  logic [P:0]      x4;
  logic [P-1:0]    x5;
  logic [10*P-1:0] x;
  int checks = 0, failures = 0;
  int n_top2 = 0, n_top3 = 0, n_top4 = 0, n_x5ones = 0, n_eac = 0, n_zero_fix = 0;

  reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x(x));

  function automatic longint unsigned rnd64();
    return {32'($urandom), 32'($urandom)};
  endfunction

  task automatic apply(input longint unsigned xv);
    x1 = (2*P)'(xv % M1);
    x2 = (4*P+1)'(xv % M2);
    x3 = (2*P+1)'(xv % M3);
    x4 = (P+1)'(xv % M4);
    x5 = P'(xv % M5);
    if (x5 == '0 && $urandom_range(1) == 1) begin
      x5 = '1;
      n_x5ones++;
    end
    #1;
    if (x2[4*P]) n_top2++;
    if (x3[2*P]) n_top3++;
    if (x4[P])   n_top4++;
    if (dut.u_cpa1.t[N]) n_eac++;
    if (&dut.m_raw) n_zero_fix++;
    checks++;
    if (longint'(x) != xv) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d residues=(%0d,%0d,%0d,%0d,%0d) got %0d", xv, x1, x2, x3, x4, x5, x);
    end
  endtask

  task automatic need(input string what, input int n);
    $display("%-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned d;
    for (longint unsigned v = 0; v < M1; v++) apply(v);
    for (longint unsigned v = MTOT - 64; v < MTOT; v++) apply(v);
    for (int i = 0; i < 2000; i++) begin
      case (i % 4)
        0: d = M2;
        1: d = M3;
        2: d = M4;
        default: d = M2 * M3 * M4;
      endcase
      apply((d * (1 + rnd64() % (MTOT / d - 1)) - 1) % MTOT);
    end
    for (int i = 0; i < 100000; i++) apply(rnd64() % MTOT);
    need("x2 = 2^{4p} (top bit set)", n_top2);
    need("x3 = 2^{2p} (top bit set)", n_top3);
    need("x4 = 2^p (top bit set)", n_top4);
    need("x5 given as 2^p-1", n_x5ones);
    need("end-around carry in CPA1", n_eac);
    need("all-ones CPA1 result mapped to 0", n_zero_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
