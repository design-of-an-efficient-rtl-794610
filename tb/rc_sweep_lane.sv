// rc_sweep_lane: test harness for one reverse_converter instance of word-length
// parameter P, used by tb_rc_sweep to run several sizes side by side.
//
// On start it applies NTESTS numbers below the dynamic range
// 2^{2p}(2^{4p}+1)(2^{2p}+1)(2^p+1)(2^p-1): the extremes, numbers of the form
// d*k - 1 that set the top bits of the 2^k+1 channels, and random numbers. The
// residues and the expected output are computed with 128-bit arithmetic, so any
// P up to 12 works. With EXHAUSTIVE set it converts every X of the range
// instead (practical for p = 2, about one million numbers). It reports its check and failure counts and raises done.
module rc_sweep_lane #(
  parameter int unsigned P = 3,
  parameter int unsigned NTESTS = 2000,
  parameter bit          EXHAUSTIVE = 1'b0   // convert every X of the range instead
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned W = 128;
  localparam logic [W-1:0] M1 = W'(1) << (2*P);
  localparam logic [W-1:0] M2 = (W'(1) << (4*P)) + 1;
  localparam logic [W-1:0] M3 = (W'(1) << (2*P)) + 1;
  localparam logic [W-1:0] M4 = (W'(1) << P) + 1;
  localparam logic [W-1:0] M5 = (W'(1) << P) - 1;
  localparam logic [W-1:0] MTOT = M1 * M2 * M3 * M4 * M5;

  logic [2*P-1:0]  x1;
  logic [4*P:0]    x2;
  logic [2*P:0]    x3;
  logic [P:0]      x4;
  logic [P-1:0]    x5;
  logic [10*P-1:0] x;

  reverse_converter #(.P(P)) dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x(x));

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic apply(input logic [W-1:0] xv);
    x1 = (2*P)'(xv % M1);
    x2 = (4*P+1)'(xv % M2);
    x3 = (2*P+1)'(xv % M3);
    x4 = (P+1)'(xv % M4);
    x5 = P'(xv % M5);
    #1;
    checks++;
    if (W'(x) != xv) begin
      failures++;
      if (failures < 5) $display("FAIL p=%0d X=%h got %h", P, xv, x);
    end
  endtask

  initial begin : run
    logic [W-1:0] d;
    checks = 0;
    failures = 0;
    done = 1'b0;
    wait (start);
    if (EXHAUSTIVE) begin
      for (logic [W-1:0] v = '0; v < MTOT; v++) apply(v);
    end else begin
      apply('0);
      apply(MTOT - 1);
      for (int i = 0; i < int'(NTESTS); i++) begin
        if (i % 2 == 0) begin
          case ((i / 2) % 4)
            0: d = M2;
            1: d = M3;
            2: d = M4;
            default: d = M2 * M3 * M4;
          endcase
          apply((d * (1 + rnd() % (MTOT / d - 1)) - 1) % MTOT);
        end else begin
          apply(rnd() % MTOT);
        end
      end
    end
    done = 1'b1;
  end
endmodule
