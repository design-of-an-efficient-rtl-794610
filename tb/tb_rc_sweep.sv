// tb_rc_sweep: runs the reverse converter at every word-length parameter for
// which a dynamic range is tabulated, p = 2, 3, 4, 5, 6, 7 and 10 (output widths
// 20, 30, 40, 50, 60, 70 and 100 bits), each through an rc_sweep_lane that
// checks conversions of random and corner numbers against 128-bit arithmetic.
// An eighth lane converts every number of the p = 2 range.
module tb_rc_sweep;
  localparam int NL = 8;
  logic start = 1'b0;
  int   lane_checks [NL];
  int   lane_failures [NL];
  logic [NL-1:0] lane_done;
  int checks = 0, failures = 0;

  rc_sweep_lane #(.P(2))  u_p2  (.start(start), .checks(lane_checks[0]), .failures(lane_failures[0]), .done(lane_done[0]));
  rc_sweep_lane #(.P(3))  u_p3  (.start(start), .checks(lane_checks[1]), .failures(lane_failures[1]), .done(lane_done[1]));
  rc_sweep_lane #(.P(4))  u_p4  (.start(start), .checks(lane_checks[2]), .failures(lane_failures[2]), .done(lane_done[2]));
  rc_sweep_lane #(.P(5))  u_p5  (.start(start), .checks(lane_checks[3]), .failures(lane_failures[3]), .done(lane_done[3]));
  rc_sweep_lane #(.P(6))  u_p6  (.start(start), .checks(lane_checks[4]), .failures(lane_failures[4]), .done(lane_done[4]));
  rc_sweep_lane #(.P(7))  u_p7  (.start(start), .checks(lane_checks[5]), .failures(lane_failures[5]), .done(lane_done[5]));
  rc_sweep_lane #(.P(10)) u_p10 (.start(start), .checks(lane_checks[6]), .failures(lane_failures[6]), .done(lane_done[6]));
  // every number of the p = 2 range: 16 * 257 * 17 * 5 * 3 = 1,048,560 conversions
  rc_sweep_lane #(.P(2), .EXHAUSTIVE(1'b1)) u_p2_all (.start(start), .checks(lane_checks[7]), .failures(lane_failures[7]), .done(lane_done[7]));

  initial begin
    #100000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 start = 1'b1;
    wait (&lane_done);
    #1;
    foreach (lane_checks[i]) begin
      $display("lane %0d: checks=%0d failures=%0d", i, lane_checks[i], lane_failures[i]);
      checks += lane_checks[i];
      failures += lane_failures[i];
      if (lane_checks[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
