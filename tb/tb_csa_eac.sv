// tb_csa_eac: self-checking test of the modulo 2^N-1 carry-save adder.
//
// Drives random and corner operands (all zeros, all ones, single top bits that
// force the end-around carry) into a 24-bit instance and checks that
//   s == a ^ b ^ c   and   (s + cy) mod (2^N-1) == (a + b + c) mod (2^N-1),
// with the reference sums computed in 64-bit integers. Counts how often a carry
// actually wrapped from the top bit to bit 0 and fails if it never did.
module tb_csa_eac;
  localparam int unsigned N = 8 * rc_pkg::DEFAULT_P;
  localparam longint unsigned MOD = (64'd1 << N) - 1;

  logic [N-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0, wraps = 0;

  csa_eac dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic apply(input logic [N-1:0] ta, tb_, tc);
    longint unsigned want, got;
    a = ta; b = tb_; c = tc;
    #1;
    want = (longint'(ta) + longint'(tb_) + longint'(tc)) % MOD;
    got  = (longint'(s) + longint'(cy)) % MOD;
    checks++;
    if (got != want || s != (ta ^ tb_ ^ tc)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c=%h s=%h cy=%h", ta, tb_, tc, s, cy);
    end
    if ((ta[N-1] & tb_[N-1]) | (ta[N-1] & tc[N-1]) | (tb_[N-1] & tc[N-1])) wraps++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, '0);
    apply('1, 24'd1, '0);
    for (int i = 0; i < 5000; i++) apply(N'($urandom), N'($urandom), N'($urandom));
    if (wraps == 0) begin failures++; $display("end-around carry never exercised"); end
    $display("end-around carries: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
