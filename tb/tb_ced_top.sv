// End-to-end testbench of ced_top at reduced size: 8 scan chains of 6 cells,
// an 8-bit input shift register, once with a 3-bit mask code and an 8-word
// mask memory (so the test set needs several memory sessions, and spare
// words serve as extra codes) and once with the uncoded 8-bit mask
// register. Both runs get the same test set; the coded run, memory reloads
// included, must take fewer clocks. See ced_bench for what is checked.
module tb_ced_top;
  logic done_c, done_u;
  int   checks_c, failures_c, clocks_c, checks_u, failures_u, clocks_u;
  int   extra;

  ced_bench #(.N(8), .L(6), .R(8), .K(3), .CODED(1'b1), .PATTERNS(8),
              .RESP_CARE(3), .EXTRA_CARE(2), .MAXV(1024),
              .NEED_LOCKOUT(1'b1), .NEED_SESSIONS(1'b1), .MCM(1'b1), .SEED(7))
    b_coded (.done(done_c), .checks(checks_c), .failures(failures_c), .clocks(clocks_c));

  ced_bench #(.N(8), .L(6), .R(8), .K(3), .CODED(1'b0), .PATTERNS(8),
              .RESP_CARE(3), .EXTRA_CARE(2), .MAXV(1024),
              .NEED_LOCKOUT(1'b1), .NEED_SESSIONS(1'b0), .MCM(1'b0), .SEED(7))
    b_plain (.done(done_u), .checks(checks_u), .failures(failures_u), .clocks(clocks_u));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_u, failures_c + failures_u + 1);
    $finish;
  end

  initial begin
    #1;  // let every bench clear done first
    wait (done_c === 1'b1 && done_u === 1'b1);
    extra = (clocks_c < clocks_u) ? 0 : 1;
    if (extra != 0) $display("FAIL coded scan time %0d not below uncoded %0d", clocks_c, clocks_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_u + 1,
             failures_c + failures_u + extra);
    $finish;
  end
endmodule
