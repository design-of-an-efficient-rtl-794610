// tb_cpa_eac: self-checking test of the modulo 2^N-1 end-around-carry adder.
//
// For a 24-bit instance the expected output is a+b when that is below 2^N and
// a+b-(2^N-1) otherwise (computed in 64-bit integers), which includes the
// all-ones result for a+b = 2^N-1. Directed cases cover a = ~b, both operands
// all ones and the smallest wrapping sum; random pairs cover the rest. The
// test counts sums that wrapped and fails if none did.
module tb_cpa_eac;
  localparam int unsigned N = 8 * rc_pkg::DEFAULT_P;
  localparam longint unsigned TWO_N = 64'd1 << N;

  logic [N-1:0] a, b, s;
  int checks = 0, failures = 0, wraps = 0;

  cpa_eac dut (.a(a), .b(b), .s(s));

  task automatic apply(input logic [N-1:0] ta, tb_);
    longint unsigned v, want;
    a = ta; b = tb_;
    #1;
    v = longint'(ta) + longint'(tb_);
    if (v >= TWO_N) begin
      want = v - (TWO_N - 1);
      wraps++;
    end else begin
      want = v;
    end
    checks++;
    if (longint'(s) != want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h want=%h", ta, tb_, s, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] r;
    apply('0, '0);
    apply('1, '1);
    apply('1, N'(1));
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    for (int i = 0; i < 200; i++) begin
      r = N'($urandom);
      apply(r, ~r);
    end
    for (int i = 0; i < 5000; i++) apply(N'($urandom), N'($urandom));
    if (wraps == 0) begin failures++; $display("end-around carry never exercised"); end
    $display("end-around carries: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
