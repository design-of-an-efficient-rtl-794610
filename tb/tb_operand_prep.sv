// tb_operand_prep: self-checking test of the operand preparation (p = 3).
//
// Picks a binary number X below the dynamic range 2^{2p}(2^{4p}+1)(2^{2p}+1)
// (2^p+1)(2^p-1), computes its five residues with the % operator, and checks
// that the seven vectors H1..H7 add up, modulo 2^{8p}-1, to M = X >> 2p (the
// CRT-I relation X = x1 + 2^{2p} M). Also checks H1 bit by bit. Besides random
// numbers it uses X = d*k - 1 for d = m2, m3, m4 and m2*m3*m4, so that x2, x3
// and x4 take their largest value 2^k (top bit set) alone and together, and
// counts each of those cases.
module tb_operand_prep;
  localparam int unsigned P = rc_pkg::DEFAULT_P;
  localparam int unsigned N = 8 * P;
  localparam longint unsigned M1 = 64'd1 << (2*P);
  localparam longint unsigned M2 = (64'd1 << (4*P)) + 1;
  localparam longint unsigned M3 = (64'd1 << (2*P)) + 1;
  localparam longint unsigned M4 = (64'd1 << P) + 1;
  localparam longint unsigned M5 = (64'd1 << P) - 1;
  localparam longint unsigned MTOT = M1 * M2 * M3 * M4 * M5;
  localparam longint unsigned MODN = (64'd1 << N) - 1;

  logic [2*P-1:0] x1;
  logic [4*P:0]   x2;
  logic [2*P:0]   x3;
  logic [P:0]     x4;
  logic [P-1:0]   x5;
  logic [6:0][N-1:0] h;
  int checks = 0, failures = 0;
  int top2 = 0, top3 = 0, top4 = 0;

  operand_prep dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .h(h));

  function automatic longint unsigned rnd64();
    return {32'($urandom), 32'($urandom)};
  endfunction

  task automatic apply(input longint unsigned xv);
    longint unsigned sum, want;
    x1 = (2*P)'(xv % M1);
    x2 = (4*P+1)'(xv % M2);
    x3 = (2*P+1)'(xv % M3);
    x4 = (P+1)'(xv % M4);
    x5 = P'(xv % M5);
    #1;
    if (x2[4*P]) top2++;
    if (x3[2*P]) top3++;
    if (x4[P])   top4++;
    sum = 0;
    for (int i = 0; i < 7; i++) sum = (sum + longint'(h[i])) % MODN;
    want = (xv >> (2*P)) % MODN;
    checks++;
    if (sum != want) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d sum=%h want=%h", xv, sum, want);
    end
    checks++;
    if (h[0] != {~x1, {(6*P){1'b1}}}) begin
      failures++;
      if (failures < 10) $display("FAIL H1 X=%0d h1=%h", xv, h[0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned d;
    apply(0);
    apply(MTOT - 1);
    for (int i = 0; i < 4000; i++) apply(rnd64() % MTOT);
    for (int i = 0; i < 400; i++) begin
      case (i % 4)
        0: d = M2;
        1: d = M3;
        2: d = M4;
        default: d = M2 * M3 * M4;
      endcase
      apply((d * (1 + rnd64() % (MTOT / d - 1)) - 1) % MTOT);
    end
    if (top2 == 0 || top3 == 0 || top4 == 0) begin
      failures++;
      $display("top-bit residue case missing: %0d %0d %0d", top2, top3, top4);
    end
    $display("top bits set: x2 %0d, x3 %0d, x4 %0d", top2, top3, top4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
